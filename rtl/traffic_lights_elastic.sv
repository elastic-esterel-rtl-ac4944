// traffic_lights_elastic: elastic circuit of an Esterel traffic light
// controller for the crossing of a north road and a west road.
//
// Inputs (pure signals): second (a 1 Hz tick), north_road_req,
// west_road_req. Outputs (pure): red/yellow/green for each road.
// Behaviour, one reaction per cycle:
//   - north_road_open toggles in every reaction in which change_open_road is
//     emitted (north_road_open = change xor its previous value, initially
//     false).
//   - Road thread: after each change it counts seconds; after 30 seconds it
//     waits for a request from the closed road (west_road_req while the north
//     road is open, north_road_req otherwise); the request, or 60 seconds
//     in total, emits change_open_road and starts a new period. Seconds are
//     counted only in reactions after the one that started the period.
//   - Light thread, restarted by every change: the road being closed shows
//     yellow (the other red) until 2 seconds have passed, then both red until
//     1 more second, then the open road green and the other red.
// Registers: Boot, NRO (previous north_road_open), PhA/CntA (road thread,
// 6-bit second counter), PhB/CntB (light thread, 2-bit counter).
// Elastic version: double_latch registers and an elastic_control layer; the
// three inputs and six outputs are separate SELF channels. Every register
// and output reads every input and register (Boot reads only itself): a
// coarse dependency graph of this design's choosing.
// The program follows the document; the state encoding and equations are
// this design's derivation of its circuit.
// Lint note: verilator reports circular combinational logic (UNOPTFLAT)
// through the double_latch registers, because it sees every latch as a
// combinational path from d to q. Each loop here runs from a register output
// through the next-state logic back into the same register's master latch
// and on through its slave latch; the master is open only in the low clock
// phase and the slave only in the high phase, so the loop is never
// transparent end to end. The warning is inherent to latch-pair registers.
module traffic_lights_elastic
  import traffic_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic second,
  input  logic valid_second,
  output logic stop_second,
  input  logic north_road_req,
  input  logic valid_north_road_req,
  output logic stop_north_road_req,
  input  logic west_road_req,
  input  logic valid_west_road_req,
  output logic stop_west_road_req,
  output logic north_red,
  output logic valid_north_red,
  input  logic stop_north_red,
  output logic north_yellow,
  output logic valid_north_yellow,
  input  logic stop_north_yellow,
  output logic north_green,
  output logic valid_north_green,
  input  logic stop_north_green,
  output logic west_red,
  output logic valid_west_red,
  input  logic stop_west_red,
  output logic west_yellow,
  output logic valid_west_yellow,
  input  logic stop_west_yellow,
  output logic west_green,
  output logic valid_west_green,
  input  logic stop_west_green
);

  localparam int unsigned N_IN  = 3;
  localparam int unsigned N_REG = 6;
  localparam int unsigned N_OUT = 6;
  localparam int unsigned N_SRC = N_IN + N_REG;
  localparam int unsigned R_BOOT = 0, R_NRO = 1, R_PHA = 2, R_CNTA = 3, R_PHB = 4, R_CNTB = 5;
  localparam int unsigned SECONDS_REQ   = 30;   // minimum period before a request counts
  localparam int unsigned SECONDS_MAX   = 60;   // forced change
  localparam int unsigned SECONDS_YEL   = 2;
  localparam int unsigned SECONDS_RED   = 1;

  function automatic logic [N_REG-1:0][N_SRC-1:0] reg_dep();
    logic [N_REG-1:0][N_SRC-1:0] m = '1;
    m[R_BOOT]                = '0;
    m[R_BOOT][N_IN + R_BOOT] = 1'b1;
    return m;
  endfunction

  logic [N_REG-1:0] en1, en2;

  elastic_control #(
    .N_IN(N_IN), .N_REG(N_REG), .N_OUT(N_OUT),
    .REG_DEP(reg_dep()), .OUT_DEP('1), .REG_INIT('1)
  ) u_ctrl (
    .clk(clk), .rst(rst),
    .in_valid ({valid_west_road_req, valid_north_road_req, valid_second}),
    .in_stop  ({stop_west_road_req, stop_north_road_req, stop_second}),
    .out_valid({valid_west_green, valid_west_yellow, valid_west_red,
                valid_north_green, valid_north_yellow, valid_north_red}),
    .out_stop ({stop_west_green, stop_west_yellow, stop_west_red,
                stop_north_green, stop_north_yellow, stop_north_red}),
    .en1(en1), .en2(en2)
  );

  logic         boot_q, nro_q, nro;
  road_phase_t  pha_q, pha_d;
  light_phase_t phb_q, phb_d, shown;
  logic         pha_raw;
  logic [1:0]   phb_raw;
  logic [5:0]   cnta_q, cnta_d, ca;
  logic [1:0]   cntb_q, cntb_d, cb;
  logic         change, req;

  always_comb begin
    // Road thread.
    change = 1'b0;
    pha_d  = pha_q;
    ca     = cnta_q + {5'd0, second};
    cnta_d = ca;
    req    = nro_q ? west_road_req : north_road_req;
    if (boot_q) begin
      cnta_d = '0;
      pha_d  = PH_WAIT30;
    end else if (second && ca == 6'(SECONDS_MAX)) begin
      change = 1'b1;                       // strong abort after 60 seconds
    end else if (pha_q == PH_WAIT30) begin
      if (second && ca == 6'(SECONDS_REQ)) pha_d = PH_WAITREQ;
    end else if (req) begin
      change = 1'b1;                       // request from the closed road
    end
    if (change) begin
      cnta_d = '0;
      pha_d  = PH_WAIT30;
    end
    nro = change ^ nro_q;

    // Light thread.
    cb     = cntb_q + {1'b0, second};
    cntb_d = cntb_q;
    phb_d  = phb_q;
    shown  = phb_q;
    if (boot_q || change) begin
      shown  = LT_YELLOW;
      cntb_d = '0;
    end else begin
      unique case (phb_q)
        LT_YELLOW: begin
          if (second && cb == 2'(SECONDS_YEL)) begin
            shown  = LT_RED;
            cntb_d = '0;
          end else begin
            cntb_d = cb;
          end
        end
        LT_RED: begin
          if (second && cb == 2'(SECONDS_RED)) begin
            shown  = LT_GREEN;
            cntb_d = '0;
          end else begin
            cntb_d = cb;
          end
        end
        default:  shown = LT_GREEN;
      endcase
    end
    phb_d = shown;

    north_red    = 1'b0; north_yellow = 1'b0; north_green = 1'b0;
    west_red     = 1'b0; west_yellow  = 1'b0; west_green  = 1'b0;
    unique case (shown)
      LT_YELLOW: if (nro) begin north_red = 1'b1; west_yellow = 1'b1; end
                 else     begin west_red  = 1'b1; north_yellow = 1'b1; end
      LT_RED:    begin north_red = 1'b1; west_red = 1'b1; end
      default:   if (nro) begin north_green = 1'b1; west_red  = 1'b1; end
                 else     begin west_green  = 1'b1; north_red = 1'b1; end
    endcase
  end

  double_latch #(.W(1)) u_boot (.clk(clk), .rst(rst), .en1(en1[R_BOOT]), .en2(en2[R_BOOT]),
    .init(1'b1), .d(1'b0), .q(boot_q));
  double_latch #(.W(1)) u_nro (.clk(clk), .rst(rst), .en1(en1[R_NRO]), .en2(en2[R_NRO]),
    .init(1'b0), .d(nro), .q(nro_q));
  double_latch #(.W(1)) u_pha (.clk(clk), .rst(rst), .en1(en1[R_PHA]), .en2(en2[R_PHA]),
    .init(PH_WAIT30), .d(pha_d), .q(pha_raw));
  double_latch #(.W(6)) u_cnta (.clk(clk), .rst(rst), .en1(en1[R_CNTA]), .en2(en2[R_CNTA]),
    .init('0), .d(cnta_d), .q(cnta_q));
  double_latch #(.W(2)) u_phb (.clk(clk), .rst(rst), .en1(en1[R_PHB]), .en2(en2[R_PHB]),
    .init(LT_YELLOW), .d(phb_d), .q(phb_raw));

  assign pha_q = road_phase_t'(pha_raw);
  assign phb_q = light_phase_t'(phb_raw);
  double_latch #(.W(2)) u_cntb (.clk(clk), .rst(rst), .en1(en1[R_CNTB]), .en2(en2[R_CNTB]),
    .init('0), .d(cntb_d), .q(cntb_q));

endmodule
