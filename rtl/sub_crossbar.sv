// sub_crossbar: one N_IN x N_OUT quarter of the pipelined MUX crossbar.
//
// Every output owns an N_IN-to-1 MUX tree, split into two clocked stages
// as in the floor plan of the switch core:
//   stage A  a static 2-to-1 MUX followed by a 4-to-1 MUX embedded in a
//            flip-flop (SDFF), i.e. a registered 8-to-1 selection inside
//            each group of 8 neighbouring inputs (select bits [2:0]);
//   stage B  two static 4-to-1 MUXes in series, a 16-to-1 selection over
//            the 16 group results (select bits [6:3]).
// With OUT_REG = 1 ("near" sub-crossbar, whose inputs arrive one cycle
// early) a register follows stage B; with OUT_REG = 0 ("far" sub-crossbar,
// whose inputs went through the extra long-wire flip-flop) stage B feeds
// the output SDFF 2-to-1 MUX of the core directly.
//
// Interface: din and sel are presented together in one cycle; sel[o] is
// the index of the input that output o takes. The select bits of stage B
// are delayed inside this block so that each MUX sees the select of the
// word it is switching. Latency: 1 cycle (OUT_REG = 0) or 2 cycles
// (OUT_REG = 1) from din to dout.
//
// The MUX structure (2-to-1, SDFF 4-to-1, 4-to-1, 4-to-1) follows the
// design; which select bits drive which MUX level (low bits first) is
// this implementation's choice. The datapath has no reset: the core's
// valid flag, kept by the controller, tells when dout is meaningful.
module sub_crossbar #(
  parameter int unsigned N_IN    = 128,
  parameter int unsigned N_OUT   = 128,
  parameter int unsigned W       = 2,
  parameter bit          OUT_REG = 1'b1,
  localparam int unsigned SEL_W  = $clog2(N_IN)
) (
  input  logic                         clk,
  input  logic [N_IN-1:0][W-1:0]       din,
  input  logic [N_OUT-1:0][SEL_W-1:0]  sel,
  output logic [N_OUT-1:0][W-1:0]      dout
);

  localparam int unsigned GROUPS = N_IN / 8;  // results of stage A per output

  initial begin
    assert (N_IN == 128)
      else $error("sub_crossbar: the 8-to-1 / 16-to-1 split needs N_IN = 128");
  end

  // ---- stage A: static 2-to-1 + SDFF 4-to-1 --------------------------
  logic [N_OUT-1:0][GROUPS-1:0][W-1:0] a_q;     // SDFF outputs
  logic [N_OUT-1:0][3:0]               sel_b_q; // stage B select, delayed
  logic [N_OUT-1:0][W-1:0]             b_d;     // stage B result

  for (genvar o = 0; o < N_OUT; o++) begin : g_out
    for (genvar g = 0; g < GROUPS; g++) begin : g_grp
      logic [3:0][W-1:0] m2;  // outputs of the four static 2-to-1 MUXes
      always_comb
        for (int k = 0; k < 4; k++)
          m2[k] = sel[o][0] ? din[g*8 + 2*k + 1] : din[g*8 + 2*k];
      always_ff @(posedge clk) a_q[o][g] <= m2[sel[o][2:1]];
    end

    always_ff @(posedge clk) sel_b_q[o] <= sel[o][6:3];

    // ---- stage B: static 4-to-1, static 4-to-1 -----------------------
    logic [3:0][W-1:0] m4;    // outputs of the first 4-to-1 level
    always_comb begin
      for (int k = 0; k < 4; k++)
        m4[k] = a_q[o][4*k + int'(sel_b_q[o][1:0])];
      b_d[o] = m4[sel_b_q[o][3:2]];
    end
  end

  if (OUT_REG) begin : g_out_reg
    always_ff @(posedge clk) dout <= b_d;
  end else begin : g_out_comb
    assign dout = b_d;
  end

endmodule
