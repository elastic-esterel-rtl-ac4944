// elastic_control: the elastic control layer of an elasticized register
// netlist (the TOP_CONTROL block that sits beside the datapath).
//
// The datapath is the original synchronous circuit with every register
// replaced by a double_latch. Its connectivity is described by two
// dependency matrices over "sources", numbered inputs first (0..N_IN-1) and
// registers after them (N_IN + r):
//   REG_DEP[r][s] = 1  if the next value of register r reads source s;
//   OUT_DEP[o][s] = 1  if output o reads source s.
// For every source there is one elastic channel per reader. The control is:
//   - one elastic module per register: an elastic_join over the channels of
//     the sources it reads, an eb_ctrl (whose en1/en2 drive the register's
//     latches), and an elastic_fork_eager towards every reader;
//   - for every environment input an eager fork towards its readers;
//   - for every output a combinational interface module: a join over the
//     sources it reads, whose valid/stop are the output channel itself.
// A register captures its next value exactly when all of its sources offer
// their current token, so each register receives one token per cycle of
// the original circuit, in order, and the output token streams equal the
// original output sequences whatever bubbles and stops the environment
// inserts (latency equivalence). Registers whose REG_INIT bit is 1 start
// with their init value as a token.
// Interface: in_valid/in_stop per input channel, out_valid/out_stop per
// output channel, en1/en2 per register. Timing: en1 is meant for the low
// clock phase and en2 for the high phase (see eb_ctrl).
// The netlist structure (join, buffer with two output latches, fork; outputs
// through a combinational interface module; eager forks) follows the
// document; describing the netlist with dependency-matrix parameters instead
// of generating a new module per design is this implementation's choice.
module elastic_control #(
  parameter int unsigned N_IN  = 1,
  parameter int unsigned N_REG = 1,
  parameter int unsigned N_OUT = 1,
  parameter logic [N_REG-1:0][N_IN+N_REG-1:0] REG_DEP  = '1,
  parameter logic [N_OUT-1:0][N_IN+N_REG-1:0] OUT_DEP  = '1,
  parameter logic [N_REG-1:0]                 REG_INIT = '1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [N_IN-1:0]  in_valid,
  output logic [N_IN-1:0]  in_stop,
  output logic [N_OUT-1:0] out_valid,
  input  logic [N_OUT-1:0] out_stop,
  output logic [N_REG-1:0] en1,
  output logic [N_REG-1:0] en2
);

  localparam int unsigned N_SRC = N_IN + N_REG;
  localparam int unsigned N_DST = N_REG + N_OUT;

  // Channel from source s to reader d (readers: registers, then outputs).
  logic ch_v [N_SRC][N_DST];
  logic ch_s [N_SRC][N_DST];

  // Source side of every register's elastic buffer.
  logic [N_REG-1:0] eb_vout, eb_sout, eb_vin, eb_sin;

  for (genvar s = 0; s < N_SRC; s++) begin : g_src
    logic [N_DST-1:0] rd_mask, fv, fs;
    logic             src_v, src_s;

    for (genvar d = 0; d < N_DST; d++) begin : g_rd
      if (d < N_REG) begin : g_r
        assign rd_mask[d] = REG_DEP[d][s];
      end else begin : g_o
        assign rd_mask[d] = OUT_DEP[d-N_REG][s];
      end
      assign ch_v[s][d] = fv[d];
      assign fs[d]      = ch_s[s][d];
    end

    if (s < N_IN) begin : g_in
      assign src_v       = in_valid[s];
      assign in_stop[s]  = src_s;
    end else begin : g_reg
      assign src_v             = eb_vout[s-N_IN];
      assign eb_sout[s-N_IN]   = src_s;
    end

    elastic_fork_eager #(.N(N_DST)) u_fork (
      .clk(clk), .rst(rst), .mask(rd_mask),
      .v_in(src_v), .s_in(src_s), .v_out(fv), .s_out(fs)
    );
  end

  for (genvar d = 0; d < N_DST; d++) begin : g_dst
    logic [N_SRC-1:0] jmask, jv, js;
    logic             jvo, jso;

    for (genvar s = 0; s < N_SRC; s++) begin : g_s
      if (d < N_REG) begin : g_r
        assign jmask[s] = REG_DEP[d][s];
      end else begin : g_o
        assign jmask[s] = OUT_DEP[d-N_REG][s];
      end
      assign jv[s]      = ch_v[s][d];
      assign ch_s[s][d] = js[s];
    end

    elastic_join #(.N(N_SRC)) u_join (
      .mask(jmask), .v_in(jv), .s_in(js), .v_out(jvo), .s_out(jso)
    );

    if (d < N_REG) begin : g_reg
      assign eb_vin[d] = jvo;
      assign jso       = eb_sin[d];

      eb_ctrl #(.INIT_TOKEN(REG_INIT[d])) u_eb (
        .clk(clk), .rst(rst),
        .v_in(eb_vin[d]), .s_in(eb_sin[d]),
        .v_out(eb_vout[d]), .s_out(eb_sout[d]),
        .en1(en1[d]), .en2(en2[d])
      );
    end else begin : g_out
      assign out_valid[d-N_REG] = jvo;
      assign jso                = out_stop[d-N_REG];
    end
  end

endmodule
