// cdr_fsm: digital loop filter of one periphery clock-recovery loop.
//
// It adds up the bang-bang detector's votes (+1 per late vote, -1 per
// early vote) in a signed accumulator. When the accumulator reaches
// +THRESHOLD the sampling clocks are late: the phase code is stepped down
// by one (less delay) and the accumulator cleared; at -THRESHOLD the code
// is stepped up. The code addresses the phase selector and interpolator:
// its upper 2 bits pick a pair of neighbouring DLL phases, the lower bits
// the interpolation step between them, so the code wraps around the full
// clock period. step_up / step_dn pulse for one cycle with each change.
//
// Interface: runs on the port's recovered clock (clk_0 of the detector);
// votes are taken every cycle; a code change appears one edge after the
// vote that completes a threshold.
//
// The design names an FSM between the bang-bang detector and the phase
// selector and interpolator; the vote-counting filter, THRESHOLD and the
// code width are this implementation's choices.
module cdr_fsm #(
  parameter int unsigned PHASE_W   = 6,
  parameter int unsigned THRESHOLD = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [1:0]         early,
  input  logic [1:0]         late,
  output logic [PHASE_W-1:0] phase_code,
  output logic               step_up,
  output logic               step_dn
);

  localparam int unsigned AW = $clog2(THRESHOLD) + 2;
  localparam logic signed [AW-1:0] TH_POS = AW'(THRESHOLD);
  localparam logic signed [AW-1:0] TH_NEG = -TH_POS;

  logic signed [AW-1:0] acc, acc_next;
  logic signed [AW-1:0] vote;

  always_comb begin
    vote = AW'(signed'({1'b0, late[0]}))  + AW'(signed'({1'b0, late[1]}))
         - AW'(signed'({1'b0, early[0]})) - AW'(signed'({1'b0, early[1]}));
    acc_next = acc + vote;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc        <= '0;
      phase_code <= '0;
      step_up    <= 1'b0;
      step_dn    <= 1'b0;
    end else begin
      step_up <= 1'b0;
      step_dn <= 1'b0;
      if (acc_next >= TH_POS) begin
        acc        <= '0;
        phase_code <= phase_code - 1'b1;
        step_dn    <= 1'b1;
      end else if (acc_next <= TH_NEG) begin
        acc        <= '0;
        phase_code <= phase_code + 1'b1;
        step_up    <= 1'b1;
      end else begin
        acc <= acc_next;
      end
    end
  end

endmodule
