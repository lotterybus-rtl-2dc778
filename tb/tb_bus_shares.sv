// tb_bus_shares: bandwidth sharing of a saturated bus, static and dynamic.
//
// Four masters share each bus and never run out of data: each always
// requests, with a length far above the maximum transfer size. Every tenure
// is therefore exactly MAX_XFER words, and each master's share of the bus
// words equals its share of the lotteries. Both bus types run side by side.
//
// - Static bus, tickets 1:2:3:4. The shares must be within 1.5 points of the
//   scaled holdings 6:13:19:26 of 64, i.e. 9.4 / 20.3 / 29.7 / 40.6 %.
// - Dynamic bus, tickets 1:2:3:4 for the first half of the run, then
//   4:3:2:1. In each half the shares must be within 1.5 points of t_i / 10.
//
// The standard deviation of a share over about 6000 tenures is at most
// 0.65 points, so the margin is more than two deviations. The test also
// checks that every tenure is exactly MAX_XFER words and that the bus moves
// a word in every cycle once it has started (no idle cycle at handovers).
// Starvation bound: a master with t of T tickets wins within n draws with
// probability 1 - (1 - t/T)^n. For master 1 on the static bus (6 of 64) and
// n = 10 that is 0.627. The test counts, after each win of master 1, whether
// its next win came within 10 draws. The observed fraction must be within
// 0.05 of 0.627; that is over three standard deviations for about 1100
// samples.
module tb_bus_shares;
  import lottery_pkg::*;
  localparam int N = 4, MAXX = 8, HALF = 50000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  lb_mreq_t [N-1:0] mreq_s, mreq_d;
  lb_mrsp_t [N-1:0] mrsp_s, mrsp_d;
  lb_sreq_t [N-1:0] sreq_s, sreq_d;
  data_t    [N-1:0] srd_s, srd_d;
  logic [N-1:0][TICKET_W-1:0] tk_d;
  logic [1:0] own_s, own_d;
  logic ov_s, ov_d, xf_s, xf_d, te_s, te_d;

  lottery_bus #(.N_M(N), .N_S(N), .DYNAMIC(1'b0), .MAX_XFER(MAXX)) u_stat (
    .clk, .rst_n, .m_req(mreq_s), .m_rsp(mrsp_s), .tickets('0), .s_req(sreq_s),
    .s_rdata(srd_s), .owner(own_s), .owner_valid(ov_s), .xfer(xf_s), .tenure_end(te_s));

  lottery_bus #(.N_M(N), .N_S(N), .DYNAMIC(1'b1), .MAX_XFER(MAXX), .SEED(16'h5A17)) u_dyn (
    .clk, .rst_n, .m_req(mreq_d), .m_rsp(mrsp_d), .tickets(tk_d), .s_req(sreq_d),
    .s_rdata(srd_d), .owner(own_d), .owner_valid(ov_d), .xfer(xf_d), .tenure_end(te_d));

  for (genvar j = 0; j < N; j++) begin : g_mem
    shared_mem #(.AW(10)) u_ms (.clk, .s_req(sreq_s[j]), .rdata(srd_s[j]));
    shared_mem #(.AW(10)) u_md (.clk, .s_req(sreq_d[j]), .rdata(srd_d[j]));
  end

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // Masters: master i writes word k of its stream to slave i, word k mod 1024,
  // with data {i, k}. The stream never ends while `on` is set.
  bit on = 0, started = 0;
  int k_s[N] = '{default: 0}, k_d[N] = '{default: 0};
  function automatic lb_mreq_t word(int i, int k, bit en);
    lb_mreq_t m;
    m.req   = en;
    m.we    = 1'b1;
    m.addr  = addr_t'({2'(i), 4'b0, 10'(k)});
    m.wdata = {8'(i), 24'(k)};
    m.len   = len_t'(200);
    return m;
  endfunction

  always_comb
    for (int i = 0; i < N; i++) begin
      mreq_s[i] = word(i, k_s[i], on);
      mreq_d[i] = word(i, k_d[i], on);
    end

  int ws[2][N] = '{default: 0}, wd[2][N] = '{default: 0}, tenures_s = 0, tenures_d = 0, phase = 0;
  int run_s = 0, run_d = 0;
  int since1 = 0, gaps1 = 0, within1 = 0;
  bit seen1 = 0;
  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < N; i++) begin
      if (mrsp_s[i].gnt) begin k_s[i] <= k_s[i] + 1; ws[phase][i]++; end
      if (mrsp_d[i].gnt) begin k_d[i] <= k_d[i] + 1; wd[phase][i]++; end
    end
    if (xf_s) begin
      run_s++;
      if (te_s) begin
        chk(run_s == MAXX, "static tenure is MAX_XFER words"); run_s = 0; tenures_s++;
        if (own_s == 2'd0) begin
          if (seen1) begin gaps1++; if (since1 < 10) within1++; end
          seen1 = 1; since1 = 0;
        end else since1++;
      end
    end
    if (xf_d) begin
      run_d++;
      if (te_d) begin chk(run_d == MAXX, "dynamic tenure is MAX_XFER words"); run_d = 0; tenures_d++; end
    end
    if (started) chk(xf_s && xf_d, "saturated bus moves a word every cycle");
  end

  task automatic report(string name, int w[N], real want[N]);
    int tot = 0;
    foreach (w[i]) tot += w[i];
    for (int i = 0; i < N; i++) begin
      automatic real sh = real'(w[i]) / real'(tot);
      $display("%s master %0d: %6.2f %% (expected %6.2f %%)", name, i + 1, 100.0 * sh, 100.0 * want[i]);
      chk(sh > want[i] - 0.015 && sh < want[i] + 0.015, {name, " share follows tickets"});
    end
  endtask

  initial begin
    real w_st[N], w_up[N], w_dn[N];
    w_st = '{6.0 / 64, 13.0 / 64, 19.0 / 64, 26.0 / 64};
    w_up = '{0.1, 0.2, 0.3, 0.4};
    w_dn = '{0.4, 0.3, 0.2, 0.1};
    tk_d = {4'd4, 4'd3, 4'd2, 4'd1};
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    on <= 1;
    repeat (2) @(posedge clk);
    started <= 1;
    repeat (HALF) @(posedge clk);
    tk_d <= {4'd1, 4'd2, 4'd3, 4'd4};
    phase <= 1;
    repeat (HALF) @(posedge clk);
    started <= 0;
    on <= 0;
    repeat (3) @(posedge clk);
    $display("tenures: static %0d, dynamic %0d", tenures_s, tenures_d);
    begin
      int s_all[N];
      for (int i = 0; i < N; i++) s_all[i] = ws[0][i] + ws[1][i];
      report("static 1:2:3:4", s_all, w_st);
    end
    begin
      automatic real pw = 1.0 - (1.0 - 6.0 / 64) ** 10;
      automatic real fr = real'(within1) / real'(gaps1);
      $display("master 1 won again within 10 draws: %0d of %0d = %5.3f (1-(1-t/T)^n = %5.3f)",
               within1, gaps1, fr, pw);
      chk(gaps1 > 800 && fr > pw - 0.05 && fr < pw + 0.05, "starvation bound");
    end
    report("dynamic 1:2:3:4", wd[0], w_up);
    report("dynamic 4:3:2:1", wd[1], w_dn);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
