// tb_atm_traffic: cell source and link checker for the ATM switch.
//
// The source sends 12-word cells, one word per cycle while in_ready allows.
// Word k of the n-th cell for port p carries {p, n, k}. The destination is
// either the port with the fewest cells in flight, among those allowed by
// port_mask (so that queues stay full and every port keeps requesting: the
// saturated case), or a random port in port_mask with a random idle gap. The
// checker follows the four output links and checks that every port gets its
// own cells, complete and in order, with sop/eop on the first/last word.
module tb_atm_traffic
  import lottery_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            enable,
  input  logic            saturate,
  input  logic [3:0]      port_mask,
  input  int              gap_max,
  output logic            in_valid,
  input  logic            in_ready,
  output logic            in_sop,
  output logic [1:0]      in_port,
  output data_t           in_data,
  input  logic [3:0]      out_valid,
  input  logic [3:0]      out_sop,
  input  logic [3:0]      out_eop,
  input  data_t [3:0]     out_data,
  output int              sent [4],
  output int              recv [4],
  output int              stalls,
  output int              checks,
  output int              failures
);

  int k = 0, gap = 0, port = 0;
  int out_k [4];

  function automatic data_t word(int p, int n, int kk);
    return {2'(p), 14'(n), 16'(kk)};
  endfunction

  initial begin
    in_valid = 0; in_sop = 0; in_port = 0; in_data = 0;
    for (int p = 0; p < 4; p++) begin sent[p] = 0; recv[p] = 0; out_k[p] = 0; end
    stalls = 0; checks = 0; failures = 0;
  end

  // source
  always @(negedge clk) begin
    if (!rst_n) in_valid = 0;
    else if (!in_valid || k == 0) begin
      if (gap > 0) begin gap--; in_valid = 0; end
      else if (enable && port_mask != 0) begin
        if (!in_valid) begin
          if (saturate) begin
            automatic int best = 1 << 30;
            for (int p = 0; p < 4; p++)
              if (port_mask[p] && sent[p] - recv[p] < best) begin best = sent[p] - recv[p]; port = p; end
          end else begin
            do port = $urandom % 4; while (!port_mask[port]);
          end
        end
        in_valid = 1; in_sop = 1; in_port = 2'(port); in_data = word(port, sent[port], 0);
      end else in_valid = 0;
    end
  end

  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_sop && !in_ready) stalls++;
    if (in_valid && in_ready) begin
      if (k == 11) begin
        k = 0; sent[port]++;
        in_valid <= 0;
        gap = saturate ? 0 : int'($urandom % (gap_max + 1));
      end else begin
        k++;
        in_sop  <= 0;
        in_data <= word(port, sent[port], k);
      end
    end
    for (int p = 0; p < 4; p++) if (out_valid[p]) begin
      checks++;
      if (out_data[p] != word(p, recv[p], out_k[p]) ||
          out_sop[p] != (out_k[p] == 0) || out_eop[p] != (out_k[p] == 11)) begin
        failures++;
        $display("FAIL port %0d word %0d of cell %0d: got %h", p + 1, out_k[p], recv[p], out_data[p]);
      end
      if (out_k[p] == 11) begin out_k[p] = 0; recv[p]++; end
      else out_k[p]++;
    end
  end

endmodule
