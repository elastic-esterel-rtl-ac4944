// elastic_esterel_top: the elasticized Esterel designs side by side.
//
// Five independent elastic circuits share only the clock and the reset:
//   pipe_*  - the simple data pipeline (pipe_elastic);
//   pem_*   - two parallel await/emit threads synchronised by a loop
//             (parallel_emit_elastic);
//   gcd_*   - greatest common divisor by repeated subtraction (gcd_elastic);
//   tl_*    - traffic light controller (traffic_lights_elastic);
//   mul_*   - four-stage multiplier with configurable input channel merging
//             (mult_elastic).
// Every port keeps the name it has on its design, prefixed with the design.
// Each value travels on a SELF channel: data wires plus valid_<name>
// (sender has a token) and stop_<name> (receiver cannot take it); a token
// moves in a cycle with valid = 1 and stop = 0, and a stopped token stays
// on the channel until it moves. clk is the only clock; every register is a
// pair of latches that uses both clock phases. rst is level sensitive and
// must be held for at least one full clock cycle.
module elastic_esterel_top #(
  parameter int unsigned PIPE_N   = 3,
  parameter int unsigned PEM_N    = 3,
  parameter int unsigned GCD_W    = 32,
  parameter int unsigned MUL_W    = 32,
  parameter int unsigned MUL_N_CH = 5
) (
  input  logic clk,
  input  logic rst,
  input  logic                    pipe_In1,
  input  logic                    pipe_valid_In1,
  output logic                    pipe_stop_In1,
  input  logic [PIPE_N-1:0]       pipe_In1_data,
  input  logic                    pipe_valid_In1_data,
  output logic                    pipe_stop_In1_data,
  input  logic                    pipe_In2,
  input  logic                    pipe_valid_In2,
  output logic                    pipe_stop_In2,
  input  logic [PIPE_N-1:0]       pipe_In2_data,
  input  logic                    pipe_valid_In2_data,
  output logic                    pipe_stop_In2_data,
  output logic [PIPE_N+2:0]       pipe_Out_data,
  output logic                    pipe_valid_Out_data,
  input  logic                    pipe_stop_Out_data,
  input  logic                    pem_In1,
  input  logic                    pem_valid_In1,
  output logic                    pem_stop_In1,
  input  logic [PEM_N-1:0]        pem_In1_data,
  input  logic                    pem_valid_In1_data,
  output logic                    pem_stop_In1_data,
  input  logic                    pem_In2,
  input  logic                    pem_valid_In2,
  output logic                    pem_stop_In2,
  input  logic [PEM_N-1:0]        pem_In2_data,
  input  logic                    pem_valid_In2_data,
  output logic                    pem_stop_In2_data,
  output logic                    pem_Out1,
  output logic                    pem_valid_Out1,
  input  logic                    pem_stop_Out1,
  output logic [PEM_N-1:0]        pem_Out1_data,
  output logic                    pem_valid_Out1_data,
  input  logic                    pem_stop_Out1_data,
  output logic                    pem_Out2,
  output logic                    pem_valid_Out2,
  input  logic                    pem_stop_Out2,
  output logic [PEM_N-1:0]        pem_Out2_data,
  output logic                    pem_valid_Out2_data,
  input  logic                    pem_stop_Out2_data,
  input  logic [GCD_W-1:0]        gcd_a,
  input  logic                    gcd_valid_a,
  output logic                    gcd_stop_a,
  input  logic [GCD_W-1:0]        gcd_b,
  input  logic                    gcd_valid_b,
  output logic                    gcd_stop_b,
  input  logic                    gcd_restart,
  input  logic                    gcd_valid_restart,
  output logic                    gcd_stop_restart,
  output logic                    gcd_d,
  output logic                    gcd_valid_d,
  input  logic                    gcd_stop_d,
  output logic [GCD_W-1:0]        gcd_d_data,
  output logic                    gcd_valid_d_data,
  input  logic                    gcd_stop_d_data,
  input  logic                    tl_second,
  input  logic                    tl_valid_second,
  output logic                    tl_stop_second,
  input  logic                    tl_north_road_req,
  input  logic                    tl_valid_north_road_req,
  output logic                    tl_stop_north_road_req,
  input  logic                    tl_west_road_req,
  input  logic                    tl_valid_west_road_req,
  output logic                    tl_stop_west_road_req,
  output logic                    tl_north_red,
  output logic                    tl_valid_north_red,
  input  logic                    tl_stop_north_red,
  output logic                    tl_north_yellow,
  output logic                    tl_valid_north_yellow,
  input  logic                    tl_stop_north_yellow,
  output logic                    tl_north_green,
  output logic                    tl_valid_north_green,
  input  logic                    tl_stop_north_green,
  output logic                    tl_west_red,
  output logic                    tl_valid_west_red,
  input  logic                    tl_stop_west_red,
  output logic                    tl_west_yellow,
  output logic                    tl_valid_west_yellow,
  input  logic                    tl_stop_west_yellow,
  output logic                    tl_west_green,
  output logic                    tl_valid_west_green,
  input  logic                    tl_stop_west_green,
  input  logic [MUL_W-1:0]        mul_A,
  input  logic [MUL_W-1:0]        mul_B,
  input  logic [MUL_N_CH-1:0]     mul_in_valid,
  output logic [MUL_N_CH-1:0]     mul_in_stop,
  output logic [2*MUL_W-1:0]      mul_P,
  output logic                    mul_valid_P,
  input  logic                    mul_stop_P
);

  pipe_elastic #(.N(PIPE_N)) u_pipe (
    .clk(clk),
    .rst(rst),
    .In1(pipe_In1),
    .valid_In1(pipe_valid_In1),
    .stop_In1(pipe_stop_In1),
    .In1_data(pipe_In1_data),
    .valid_In1_data(pipe_valid_In1_data),
    .stop_In1_data(pipe_stop_In1_data),
    .In2(pipe_In2),
    .valid_In2(pipe_valid_In2),
    .stop_In2(pipe_stop_In2),
    .In2_data(pipe_In2_data),
    .valid_In2_data(pipe_valid_In2_data),
    .stop_In2_data(pipe_stop_In2_data),
    .Out_data(pipe_Out_data),
    .valid_Out_data(pipe_valid_Out_data),
    .stop_Out_data(pipe_stop_Out_data)
  );

  parallel_emit_elastic #(.N(PEM_N)) u_pem (
    .clk(clk),
    .rst(rst),
    .In1(pem_In1),
    .valid_In1(pem_valid_In1),
    .stop_In1(pem_stop_In1),
    .In1_data(pem_In1_data),
    .valid_In1_data(pem_valid_In1_data),
    .stop_In1_data(pem_stop_In1_data),
    .In2(pem_In2),
    .valid_In2(pem_valid_In2),
    .stop_In2(pem_stop_In2),
    .In2_data(pem_In2_data),
    .valid_In2_data(pem_valid_In2_data),
    .stop_In2_data(pem_stop_In2_data),
    .Out1(pem_Out1),
    .valid_Out1(pem_valid_Out1),
    .stop_Out1(pem_stop_Out1),
    .Out1_data(pem_Out1_data),
    .valid_Out1_data(pem_valid_Out1_data),
    .stop_Out1_data(pem_stop_Out1_data),
    .Out2(pem_Out2),
    .valid_Out2(pem_valid_Out2),
    .stop_Out2(pem_stop_Out2),
    .Out2_data(pem_Out2_data),
    .valid_Out2_data(pem_valid_Out2_data),
    .stop_Out2_data(pem_stop_Out2_data)
  );

  gcd_elastic #(.W(GCD_W)) u_gcd (
    .clk(clk),
    .rst(rst),
    .a(gcd_a),
    .valid_a(gcd_valid_a),
    .stop_a(gcd_stop_a),
    .b(gcd_b),
    .valid_b(gcd_valid_b),
    .stop_b(gcd_stop_b),
    .restart(gcd_restart),
    .valid_restart(gcd_valid_restart),
    .stop_restart(gcd_stop_restart),
    .d(gcd_d),
    .valid_d(gcd_valid_d),
    .stop_d(gcd_stop_d),
    .d_data(gcd_d_data),
    .valid_d_data(gcd_valid_d_data),
    .stop_d_data(gcd_stop_d_data)
  );

  traffic_lights_elastic u_tl (
    .clk(clk),
    .rst(rst),
    .second(tl_second),
    .valid_second(tl_valid_second),
    .stop_second(tl_stop_second),
    .north_road_req(tl_north_road_req),
    .valid_north_road_req(tl_valid_north_road_req),
    .stop_north_road_req(tl_stop_north_road_req),
    .west_road_req(tl_west_road_req),
    .valid_west_road_req(tl_valid_west_road_req),
    .stop_west_road_req(tl_stop_west_road_req),
    .north_red(tl_north_red),
    .valid_north_red(tl_valid_north_red),
    .stop_north_red(tl_stop_north_red),
    .north_yellow(tl_north_yellow),
    .valid_north_yellow(tl_valid_north_yellow),
    .stop_north_yellow(tl_stop_north_yellow),
    .north_green(tl_north_green),
    .valid_north_green(tl_valid_north_green),
    .stop_north_green(tl_stop_north_green),
    .west_red(tl_west_red),
    .valid_west_red(tl_valid_west_red),
    .stop_west_red(tl_stop_west_red),
    .west_yellow(tl_west_yellow),
    .valid_west_yellow(tl_valid_west_yellow),
    .stop_west_yellow(tl_stop_west_yellow),
    .west_green(tl_west_green),
    .valid_west_green(tl_valid_west_green),
    .stop_west_green(tl_stop_west_green)
  );

  mult_elastic #(.W(MUL_W), .N_CH(MUL_N_CH)) u_mul (
    .clk(clk),
    .rst(rst),
    .A(mul_A),
    .B(mul_B),
    .in_valid(mul_in_valid),
    .in_stop(mul_in_stop),
    .P(mul_P),
    .valid_P(mul_valid_P),
    .stop_P(mul_stop_P)
  );

endmodule
