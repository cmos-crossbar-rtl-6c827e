// crossbar_core: 256 x 256, 2-bit wide, 3-stage pipelined MUX crossbar.
//
// The core is four 128 x 128 sub-crossbars so that no input line has to
// drive more than 128 MUX cells:
//   sub-crossbar 0: inputs   0..127 -> outputs 0..63 and 192..255 (near)
//   sub-crossbar 1: inputs   0..127 -> outputs 64..191            (far)
//   sub-crossbar 2: inputs 128..255 -> outputs 64..191            (near)
//   sub-crossbar 3: inputs 128..255 -> outputs 0..63 and 192..255 (far)
// All inputs are registered at the core edge. A near sub-crossbar switches
// in pipeline stages 1 and 2 and registers its result; for a far one an
// extra flip-flop on the long input wire fills stage 1 and the
// sub-crossbar switches in stages 2 and 3. In stage 3 each output's SDFF
// 2-to-1 MUX picks the near or the far result (select bit 7: which half
// of the inputs), completing the 256-to-1 selection. The select word
// travels through its own pipeline so that every MUX level sees the
// select of the word it switches.
//
// Interface: din[i] is the 2-bit word of input i and sel[o] the input
// that output o takes, both presented in the same cycle. dout[o] shows
// din[sel[o]] CORE_LATENCY = 4 clock edges later (input register, three
// stages). Full throughput: a new word and a new select every cycle.
//
// The partition into sub-crossbars, the port groups, the long-wire
// register and the stage split follow the design's floor plan and timing
// diagram. The bit-to-stage assignment of the select is this
// implementation's choice. N_PORTS is fixed at 256 by the sub-crossbar's
// 8-to-1 / 16-to-1 split.
module crossbar_core #(
  parameter int unsigned N = xbar_pkg::N_PORTS,
  parameter int unsigned W = xbar_pkg::SLICES,
  localparam int unsigned SEL_W = $clog2(N)
) (
  input  logic                     clk,
  input  logic [N-1:0][W-1:0]      din,
  input  logic [N-1:0][SEL_W-1:0]  sel,
  output logic [N-1:0][W-1:0]      dout
);

  localparam int unsigned H = N / 2;   // ports per sub-crossbar side
  localparam int unsigned Q = N / 4;   // ports per group of 64

  // Local output index o (0..H-1) of a sub-crossbar to its global output.
  // Left column (sub-crossbars 0 and 3): 0..Q-1 and 3Q..N-1.
  // Right column (sub-crossbars 1 and 2): Q..3Q-1.
  function automatic int unsigned left_out(int unsigned o);
    return (o < Q) ? o : o + H;
  endfunction
  function automatic int unsigned right_out(int unsigned o);
    return o + Q;
  endfunction

  // ---- input register (core edge) and long-wire register -------------
  logic [N-1:0][W-1:0]     d1, d2;
  logic [N-1:0][SEL_W-1:0] s1, s2;
  logic [N-1:0]            s3_msb;

  always_ff @(posedge clk) begin
    d1 <= din;
    s1 <= sel;
    d2 <= d1;        // flip-flop on the long wire to the far sub-crossbar
    s2 <= s1;
    for (int o = 0; o < N; o++) s3_msb[o] <= s2[o][SEL_W-1];
  end

  // ---- select words per sub-crossbar -----------------------------------
  logic [H-1:0][SEL_W-2:0] sel_near_l, sel_near_r, sel_far_l, sel_far_r;

  always_comb begin
    for (int unsigned o = 0; o < H; o++) begin
      sel_near_l[o] = s1[left_out(o)][SEL_W-2:0];
      sel_near_r[o] = s1[right_out(o)][SEL_W-2:0];
      sel_far_l[o]  = s2[left_out(o)][SEL_W-2:0];
      sel_far_r[o]  = s2[right_out(o)][SEL_W-2:0];
    end
  end

  // ---- the four sub-crossbars -------------------------------------------
  logic [H-1:0][W-1:0] x0, x1, x2, x3;

  sub_crossbar #(.N_IN(H), .N_OUT(H), .W(W), .OUT_REG(1'b1)) u_sub0 (
    .clk, .din(d1[H-1:0]), .sel(sel_near_l), .dout(x0));
  sub_crossbar #(.N_IN(H), .N_OUT(H), .W(W), .OUT_REG(1'b0)) u_sub1 (
    .clk, .din(d2[H-1:0]), .sel(sel_far_r),  .dout(x1));
  sub_crossbar #(.N_IN(H), .N_OUT(H), .W(W), .OUT_REG(1'b1)) u_sub2 (
    .clk, .din(d1[N-1:H]), .sel(sel_near_r), .dout(x2));
  sub_crossbar #(.N_IN(H), .N_OUT(H), .W(W), .OUT_REG(1'b0)) u_sub3 (
    .clk, .din(d2[N-1:H]), .sel(sel_far_l),  .dout(x3));

  // ---- stage 3: SDFF 2-to-1 MUX per output ------------------------------
  always_ff @(posedge clk) begin
    for (int unsigned o = 0; o < H; o++) begin
      dout[left_out(o)]  <= s3_msb[left_out(o)]  ? x3[o] : x0[o];
      dout[right_out(o)] <= s3_msb[right_out(o)] ? x2[o] : x1[o];
    end
  end

endmodule
