// tb_traffic_lights_elastic: latency-equivalence test of the elastic traffic
// light controller. Random reactions (second tick, north request, west
// request) go through a cycle model of the synchronous controller written
// here from its Esterel description: a road thread that waits 30 seconds,
// then switches on a request from the closed road or at the latest after 60
// seconds, and a light thread showing yellow for 2 seconds, red for 1 second
// and then green for the newly opened road. The six lamp output streams of
// the elastic circuit, under random producers and consumers, must equal the
// model's. The stimulus must contain request-driven and timeout-driven
// switches and every lamp phase; at no reaction may both roads see green.
module tb_traffic_lights_elastic;
  localparam int unsigned NTOK = 6000;
  localparam int unsigned NCFG = 25;  // 5 valid rates x 5 stop rates
  localparam int unsigned NREP = 5;   // runs per configuration
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic ins [3][NTOK];
  logic exp [6][NTOK];

  int unsigned ntok = NTOK, vpct, spct;
  int unsigned idx [3], pretry [3];
  logic        pv [3], ps [3], ov [6], os [6], od [6];
  int unsigned ocnt [6], oret [6], operr [6];

  traffic_lights_elastic dut (
    .clk(clk), .rst(rst),
    .second(ins[0][idx[0] % NTOK]), .valid_second(pv[0]), .stop_second(ps[0]),
    .north_road_req(ins[1][idx[1] % NTOK]), .valid_north_road_req(pv[1]), .stop_north_road_req(ps[1]),
    .west_road_req(ins[2][idx[2] % NTOK]), .valid_west_road_req(pv[2]), .stop_west_road_req(ps[2]),
    .north_red(od[0]),    .valid_north_red(ov[0]),    .stop_north_red(os[0]),
    .north_yellow(od[1]), .valid_north_yellow(ov[1]), .stop_north_yellow(os[1]),
    .north_green(od[2]),  .valid_north_green(ov[2]),  .stop_north_green(os[2]),
    .west_red(od[3]),     .valid_west_red(ov[3]),     .stop_west_red(os[3]),
    .west_yellow(od[4]),  .valid_west_yellow(ov[4]),  .stop_west_yellow(os[4]),
    .west_green(od[5]),   .valid_west_green(ov[5]),   .stop_west_green(os[5]));

  for (genvar i = 0; i < 3; i++) begin : g_p
    elastic_producer u_p (.clk(clk), .rst(rst), .ntok(ntok), .valid_pct(vpct),
      .stop(ps[i]), .valid(pv[i]), .idx(idx[i]), .n_retry(pretry[i]));
  end
  for (genvar i = 0; i < 6; i++) begin : g_c
    elastic_consumer #(.W(1)) u_c (.clk(clk), .rst(rst), .stop_pct(spct), .valid(ov[i]),
      .data(od[i]), .stop(os[i]), .count(ocnt[i]), .n_retry(oret[i]), .persist_err(operr[i]));
  end

  always @(negedge clk) begin
    if (!rst)
      for (int i = 0; i < 6; i++)
        if (ov[i] && !os[i] && ocnt[i] < NTOK) begin
          checks++;
          if (od[i] !== exp[i][ocnt[i]]) begin
            failures++;
            if (failures < 10)
              $display("lamp %0d reaction %0d: %0b expected %0b", i, ocnt[i], od[i], exp[i][ocnt[i]]);
          end
        end
  end

  initial begin
    #(10 * 20_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end


  function automatic bit all_done();
    for (int i = 0; i < 6; i++) if (ocnt[i] < NTOK) return 0;
    return 1;
  endfunction

  int unsigned n_req_sw, n_timeout_sw, n_ph [3], n_stall, n_retry;

  initial begin
    // model state: north_open = 1 when the north road has (or gets) green;
    // the west road is opened by the first reaction
    bit first, north_open, waiting_req, sw;
    int secs, lsecs, light;          // light: 0 yellow, 1 red, 2 green
    n_req_sw = 0; n_timeout_sw = 0; n_ph = '{0, 0, 0}; n_stall = 0; n_retry = 0;
    repeat (NREP) begin  // new random data each time
      for (int t = 0; t < NTOK; t++) begin
        ins[0][t] = ($urandom_range(99) < 50);
        ins[1][t] = ($urandom_range(999) < 12);
        ins[2][t] = ($urandom_range(999) < 12);
      end
      first = 1; north_open = 0; waiting_req = 0; secs = 0; lsecs = 0; light = 0;
      for (int t = 0; t < NTOK; t++) begin
        bit tick, closed_req;
        tick = ins[0][t];
        closed_req = north_open ? ins[2][t] : ins[1][t];
        sw = 0;
        if (first) begin
          secs = 0; waiting_req = 0;
        end else begin
          secs += tick;
          if (tick && secs == 60) begin sw = 1; n_timeout_sw++; end
          else if (!waiting_req) begin if (tick && secs == 30) waiting_req = 1; end
          else if (closed_req) begin sw = 1; n_req_sw++; end
          if (sw) begin secs = 0; waiting_req = 0; north_open = !north_open; end
        end
        if (first || sw) begin
          light = 0; lsecs = 0;
        end else if (light == 0) begin
          lsecs += tick;
          if (tick && lsecs == 2) begin light = 1; lsecs = 0; end
        end else if (light == 1) begin
          lsecs += tick;
          if (tick && lsecs == 1) begin light = 2; lsecs = 0; end
        end
        n_ph[light]++;
        // yellow on the road being closed, red on the one being opened
        exp[0][t] = (light == 1) || (light == 0 && north_open) || (light == 2 && !north_open);
        exp[1][t] = (light == 0) && !north_open;
        exp[2][t] = (light == 2) && north_open;
        exp[3][t] = (light == 1) || (light == 0 && !north_open) || (light == 2 && north_open);
        exp[4][t] = (light == 0) && north_open;
        exp[5][t] = (light == 2) && !north_open;
        checks++;
        if (exp[2][t] && exp[5][t]) begin failures++; $display("model shows two greens"); end
        first = 0;
      end
      checks++;
      if (n_req_sw == 0 || n_timeout_sw == 0 || n_ph[0] == 0 || n_ph[1] == 0 || n_ph[2] == 0) begin
        failures++;
        $display("stimulus lacks a case");
      end
      $display("switches by request %0d, by timeout %0d; reactions yellow %0d red %0d green %0d",
               n_req_sw, n_timeout_sw, n_ph[0], n_ph[1], n_ph[2]);
      for (int c = 0; c < NCFG; c++) begin
        vpct = 100 - 20 * (c / 5); spct = 20 * (c % 5);
        rst = 1'b1;
        repeat (3) @(posedge clk);
        rst <= 1'b0;
        @(negedge clk);
        while (!all_done()) begin
          @(negedge clk);
          for (int i = 0; i < 3; i++) if (pv[i] && ps[i]) n_stall++;
        end
        for (int i = 0; i < 6; i++) begin
          n_retry += oret[i];
          checks++;
          if (operr[i] != 0) begin failures++; $display("persistence error on lamp %0d", i); end
        end
        @(posedge clk);
      end
    end
    @(posedge clk);  // let the last loop iteration settle before the summary
    checks++;
    if (n_stall == 0 || n_retry == 0) begin
      failures++;
      $display("backpressure not exercised: stalls %0d retries %0d", n_stall, n_retry);
    end
    $display("input stall cycles %0d, output retries %0d", n_stall, n_retry);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
