// tb_elastic_esterel_top: end-to-end test of elastic_esterel_top at its
// default parameters (the top is instantiated without overrides).
//
// All 19 input channels get an independent random producer and all 14
// output channels an independent random consumer, so the five elastic
// circuits in the top (pipeline, parallel emitter, gcd, traffic lights,
// five-channel multiplier) run concurrently with unrelated bubbles and
// back-pressure. Each output stream is compared token by token with a cycle
// model of the corresponding synchronous circuit (latency equivalence).
// Runs in three environment configurations with a reset between them.
// Mechanism counters, each of which must be non-zero at the end:
//   stall   - input channel cycles with valid and stop (sender waits)
//   retry   - output channel cycles with valid and stop (persistent output)
//   bubble  - output channel cycles without a token after reset
//   skew    - cycles in which two input channels of one circuit are at
//             different token positions (the channels run out of step)
//   initial - P tokens equal to the multiplier pipeline's reset contents
//   full    - cycles in which a register buffer of the gcd or multiplier
//             control holds two tokens and stops its input
//   partial - cycles in which the eager fork of gcd input a has delivered
//             the token to some of its readers but not yet to all
//   plus behavioural events: gcd results and restarts, traffic light
//   switches by request and by timeout, inputs ignored by a finished
//   parallel-emit thread.
module tb_elastic_esterel_top;
  localparam int unsigned NTOK = 1000;
  localparam int unsigned NIN  = 19;
  localparam int unsigned NOUT = 14;
  localparam int unsigned NCFG = 3;
  localparam int unsigned PN = 3, GW = 32, MW = 32;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [63:0] iv [NIN][NTOK];
  logic [63:0] exp [NOUT][NTOK];
  int unsigned ntok = NTOK, vpct, spct;
  int unsigned idx [NIN], pretry [NIN];
  logic        pv [NIN], ps [NIN], ov [NOUT], os [NOUT];
  logic [63:0] od [NOUT];
  int unsigned ocnt [NOUT], oret [NOUT], operr [NOUT];

  // current token of every input channel
  logic [63:0] cv [NIN];
  always_comb
    for (int c = 0; c < NIN; c++) cv[c] = iv[c][idx[c] % NTOK];

  logic [PN+2:0]   pipe_out;
  logic [PN-1:0]   pem_o1d, pem_o2d;
  logic            pem_o1, pem_o2, gcd_d, tl [6];
  logic [GW-1:0]   gcd_dd;
  logic [2*MW-1:0] mul_p;
  logic [4:0]      mul_v, mul_s;
  logic [MW-1:0]   mul_b;

  always_comb
    for (int j = 0; j < 4; j++) mul_b[j*MW/4 +: MW/4] = cv[15 + j][MW/4-1:0];

  elastic_esterel_top dut (
    .clk(clk), .rst(rst),
    .pipe_In1(cv[0][0]),          .pipe_valid_In1(pv[0]),      .pipe_stop_In1(ps[0]),
    .pipe_In1_data(cv[1][PN-1:0]), .pipe_valid_In1_data(pv[1]), .pipe_stop_In1_data(ps[1]),
    .pipe_In2(cv[2][0]),          .pipe_valid_In2(pv[2]),      .pipe_stop_In2(ps[2]),
    .pipe_In2_data(cv[3][PN-1:0]), .pipe_valid_In2_data(pv[3]), .pipe_stop_In2_data(ps[3]),
    .pipe_Out_data(pipe_out), .pipe_valid_Out_data(ov[0]), .pipe_stop_Out_data(os[0]),
    .pem_In1(cv[4][0]),           .pem_valid_In1(pv[4]),       .pem_stop_In1(ps[4]),
    .pem_In1_data(cv[5][PN-1:0]),  .pem_valid_In1_data(pv[5]),  .pem_stop_In1_data(ps[5]),
    .pem_In2(cv[6][0]),           .pem_valid_In2(pv[6]),       .pem_stop_In2(ps[6]),
    .pem_In2_data(cv[7][PN-1:0]),  .pem_valid_In2_data(pv[7]),  .pem_stop_In2_data(ps[7]),
    .pem_Out1(pem_o1),       .pem_valid_Out1(ov[1]),      .pem_stop_Out1(os[1]),
    .pem_Out1_data(pem_o1d), .pem_valid_Out1_data(ov[2]), .pem_stop_Out1_data(os[2]),
    .pem_Out2(pem_o2),       .pem_valid_Out2(ov[3]),      .pem_stop_Out2(os[3]),
    .pem_Out2_data(pem_o2d), .pem_valid_Out2_data(ov[4]), .pem_stop_Out2_data(os[4]),
    .gcd_a(cv[8][GW-1:0]),   .gcd_valid_a(pv[8]),        .gcd_stop_a(ps[8]),
    .gcd_b(cv[9][GW-1:0]),   .gcd_valid_b(pv[9]),        .gcd_stop_b(ps[9]),
    .gcd_restart(cv[10][0]), .gcd_valid_restart(pv[10]), .gcd_stop_restart(ps[10]),
    .gcd_d(gcd_d),       .gcd_valid_d(ov[5]),      .gcd_stop_d(os[5]),
    .gcd_d_data(gcd_dd), .gcd_valid_d_data(ov[6]), .gcd_stop_d_data(os[6]),
    .tl_second(cv[11][0]),         .tl_valid_second(pv[11]),         .tl_stop_second(ps[11]),
    .tl_north_road_req(cv[12][0]), .tl_valid_north_road_req(pv[12]), .tl_stop_north_road_req(ps[12]),
    .tl_west_road_req(cv[13][0]),  .tl_valid_west_road_req(pv[13]),  .tl_stop_west_road_req(ps[13]),
    .tl_north_red(tl[0]),    .tl_valid_north_red(ov[7]),    .tl_stop_north_red(os[7]),
    .tl_north_yellow(tl[1]), .tl_valid_north_yellow(ov[8]), .tl_stop_north_yellow(os[8]),
    .tl_north_green(tl[2]),  .tl_valid_north_green(ov[9]),  .tl_stop_north_green(os[9]),
    .tl_west_red(tl[3]),     .tl_valid_west_red(ov[10]),    .tl_stop_west_red(os[10]),
    .tl_west_yellow(tl[4]),  .tl_valid_west_yellow(ov[11]), .tl_stop_west_yellow(os[11]),
    .tl_west_green(tl[5]),   .tl_valid_west_green(ov[12]),  .tl_stop_west_green(os[12]),
    .mul_A(cv[14][MW-1:0]), .mul_B(mul_b), .mul_in_valid(mul_v), .mul_in_stop(mul_s),
    .mul_P(mul_p), .mul_valid_P(ov[13]), .mul_stop_P(os[13]));

  for (genvar j = 0; j < 5; j++) begin : g_mc
    assign mul_v[j]  = pv[14 + j];
    assign ps[14 + j] = mul_s[j];
  end

  assign od[0] = 64'(pipe_out);
  assign od[1] = 64'(pem_o1);
  assign od[2] = 64'(pem_o1d);
  assign od[3] = 64'(pem_o2);
  assign od[4] = 64'(pem_o2d);
  assign od[5] = 64'(gcd_d);
  assign od[6] = 64'(gcd_dd);
  for (genvar j = 0; j < 6; j++) begin : g_tl
    assign od[7 + j] = 64'(tl[j]);
  end
  assign od[13] = mul_p;

  for (genvar i = 0; i < NIN; i++) begin : g_p
    elastic_producer u_p (.clk(clk), .rst(rst), .ntok(ntok), .valid_pct(vpct),
      .stop(ps[i]), .valid(pv[i]), .idx(idx[i]), .n_retry(pretry[i]));
  end
  for (genvar i = 0; i < NOUT; i++) begin : g_c
    elastic_consumer #(.W(64)) u_c (.clk(clk), .rst(rst), .stop_pct(spct), .valid(ov[i]),
      .data(od[i]), .stop(os[i]), .count(ocnt[i]), .n_retry(oret[i]), .persist_err(operr[i]));
  end

  // first input channel of each circuit, and one past its last
  int unsigned grp_lo [5] = '{0, 4, 8, 11, 14};
  int unsigned grp_hi [5] = '{4, 8, 11, 14, 19};
  int unsigned n_stall = 0, n_retry = 0, n_bubble = 0, n_skew = 0, n_init = 0;
  int unsigned n_full = 0, n_partial = 0;

  always @(negedge clk) begin
    if (!rst) begin
      for (int i = 0; i < NIN; i++) if (pv[i] && ps[i]) n_stall++;
      // observed inside the control layers (stop of a buffer = buffer full)
      if (dut.u_gcd.u_ctrl.eb_sin != '0 || dut.u_mul.u_ctrl.eb_sin != '0) n_full++;
      if (dut.u_gcd.u_ctrl.g_src[0].u_fork.done_q != '0) n_partial++;
      for (int i = 0; i < NOUT; i++) begin
        if (ov[i] && os[i]) n_retry++;
        if (!ov[i] && ocnt[i] < NTOK) n_bubble++;
        if (ov[i] && !os[i] && ocnt[i] < NTOK) begin
          checks++;
          if (i == 13 && ocnt[i] < 4 && od[i] == '0) n_init++;
          if (od[i] !== exp[i][ocnt[i]]) begin
            failures++;
            if (failures < 10)
              $display("output %0d token %0d: %h expected %h", i, ocnt[i], od[i], exp[i][ocnt[i]]);
          end
        end
      end
      for (int g = 0; g < 5; g++)
        for (int i = grp_lo[g] + 1; i < grp_hi[g]; i++)
          if (idx[i] != idx[grp_lo[g]]) begin n_skew++; break; end
    end
  end

  initial begin
    #(10 * 1_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int unsigned n_ignore = 0, n_gcd = 0, n_restart = 0, n_req = 0, n_timeout = 0;

  // synchronous reference models, one reaction per token
  task automatic ref_pipe();
    logic [PN-1:0] r1 = '0, r2 = '0;
    logic [PN:0]   f1 = '0;
    logic [PN+2:0] o = '0;
    for (int t = 0; t < NTOK; t++) begin
      exp[0][t] = 64'(o);
      o  = {f1, 2'b00};
      f1 = {1'b0, r1} + {1'b0, r2};
      r1 = iv[0][t][0] ? iv[1][t][PN-1:0] : '0;
      r2 = iv[2][t][0] ? iv[3][t][PN-1:0] : '0;
    end
  endtask

  task automatic ref_pem();
    logic boot = 1, w1 = 0, w2 = 0, p = 0, go, a1, a2, e1, e2, s1, s2;
    logic [PN-1:0] v1 = '0, v2 = '0;
    for (int t = 0; t < NTOK; t++) begin
      s1 = iv[4][t][0]; s2 = iv[6][t][0];
      go = boot | p;
      a1 = go | w1; a2 = go | w2;
      e1 = a1 & s1; e2 = a2 & s2;
      if (e1) v1 = iv[5][t][PN-1:0];
      if (e2) v2 = iv[7][t][PN-1:0];
      if ((s1 && !a1) || (s2 && !a2)) n_ignore++;
      exp[1][t] = 64'(e1); exp[2][t] = 64'(v1); exp[3][t] = 64'(e2); exp[4][t] = 64'(v2);
      p  = (go | w1 | w2) & ~(a1 & ~s1) & ~(a2 & ~s2);
      w1 = a1 & ~s1; w2 = a2 & ~s2; boot = 0;
    end
  endtask

  task automatic ref_gcd();
    logic boot = 1, run = 0, idle = 0, start, active, dd, rs;
    logic [GW-1:0] r0 = '0, r1 = '0, x0, x1, l, s, dv = '0;
    for (int t = 0; t < NTOK; t++) begin
      rs = iv[10][t][0];
      start = boot | ((run | idle) & rs);
      if ((run | idle) & rs) n_restart++;
      active = start | run;
      x0 = start ? iv[8][t][GW-1:0] : r0;
      x1 = start ? iv[9][t][GW-1:0] : r1;
      l  = (x0 >= x1) ? x0 : x1;
      s  = (x0 >= x1) ? x1 : x0;
      dd = active & (l == s);
      if (dd) begin dv = s; n_gcd++; end
      exp[5][t] = 64'(dd); exp[6][t] = 64'(dv);
      if (active) begin r0 = l - s; r1 = s; end
      idle = (dd & ~start) | (idle & ~rs);
      run  = active & ~(dd & ~start);
      boot = 0;
    end
  endtask

  task automatic ref_tl();
    bit first = 1, nopen = 0, wreq = 0, sw, tick;
    int secs = 0, lsecs = 0, light = 0;
    for (int t = 0; t < NTOK; t++) begin
      tick = iv[11][t][0];
      sw = 0;
      if (first) begin secs = 0; wreq = 0; end
      else begin
        secs += tick;
        if (tick && secs == 60) begin sw = 1; n_timeout++; end
        else if (!wreq) begin if (tick && secs == 30) wreq = 1; end
        else if (nopen ? iv[13][t][0] : iv[12][t][0]) begin sw = 1; n_req++; end
        if (sw) begin secs = 0; wreq = 0; nopen = !nopen; end
      end
      if (first || sw) begin light = 0; lsecs = 0; end
      else if (light < 2) begin
        lsecs += tick;
        if (tick && lsecs == 2 - light) begin light++; lsecs = 0; end
      end
      exp[7][t]  = 64'((light == 1) || (light == 0 && nopen) || (light == 2 && !nopen));
      exp[8][t]  = 64'((light == 0) && !nopen);
      exp[9][t]  = 64'((light == 2) && nopen);
      exp[10][t] = 64'((light == 1) || (light == 0 && !nopen) || (light == 2 && nopen));
      exp[11][t] = 64'((light == 0) && nopen);
      exp[12][t] = 64'((light == 2) && !nopen);
      first = 0;
    end
  endtask

  task automatic ref_mul();
    logic [MW-1:0] b;
    for (int t = 0; t < NTOK; t++) begin
      if (t < 4) exp[13][t] = '0;
      else begin
        for (int j = 0; j < 4; j++) b[j*MW/4 +: MW/4] = iv[15 + j][t-4][MW/4-1:0];
        exp[13][t] = 64'(iv[14][t-4][MW-1:0]) * 64'(b);
      end
    end
  endtask

  function automatic bit all_done();
    for (int i = 0; i < NOUT; i++) if (ocnt[i] < NTOK) return 0;
    return 1;
  endfunction

  int unsigned cfg_v [NCFG] = '{100, 75, 90};
  int unsigned cfg_s [NCFG] = '{0, 35, 60};

  initial begin
    for (int t = 0; t < NTOK; t++) begin
      iv[0][t] = 64'($urandom_range(1));  iv[1][t] = 64'($urandom);
      iv[2][t] = 64'($urandom_range(1));  iv[3][t] = 64'($urandom);
      iv[4][t] = 64'($urandom_range(99) < 45); iv[5][t] = 64'($urandom);
      iv[6][t] = 64'($urandom_range(99) < 45); iv[7][t] = 64'($urandom);
      iv[8][t] = 64'($urandom_range(1, 150)); iv[9][t] = 64'($urandom_range(1, 150));
      iv[10][t] = 64'($urandom_range(99) < 4);
      iv[11][t] = 64'($urandom_range(99) < 60);
      iv[12][t] = 64'($urandom_range(999) < 15);
      iv[13][t] = 64'($urandom_range(999) < 15);
      iv[14][t] = 64'($urandom);
      for (int j = 0; j < 4; j++) iv[15 + j][t] = 64'($urandom_range(255));
    end
    ref_pipe(); ref_pem(); ref_gcd(); ref_tl(); ref_mul();
    for (int c = 0; c < NCFG; c++) begin
      vpct = cfg_v[c]; spct = cfg_s[c];
      rst = 1'b1;
      repeat (3) @(posedge clk);
      rst <= 1'b0;
      @(negedge clk);
      while (!all_done()) @(negedge clk);
      for (int i = 0; i < NOUT; i++) begin
        checks++;
        if (operr[i] != 0) begin failures++; $display("persistence error on output %0d", i); end
      end
      @(posedge clk);
    end
    $display("stall %0d retry %0d bubble %0d skew %0d initial %0d full %0d partial %0d",
             n_stall, n_retry, n_bubble, n_skew, n_init, n_full, n_partial);
    $display("ignored inputs %0d, gcd results %0d, gcd restarts %0d, switches by request %0d, by timeout %0d",
             n_ignore, n_gcd, n_restart, n_req, n_timeout);
    checks++;
    if (n_stall == 0 || n_retry == 0 || n_bubble == 0 || n_skew == 0 || n_init == 0 ||
        n_full == 0 || n_partial == 0 ||
        n_ignore == 0 || n_gcd == 0 || n_restart == 0 || n_req == 0 || n_timeout == 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
