// frame_counter: the 4/36 counter that paces the frame DMUXes.
//
// A frame is FRAME_CYCLES = 36 core cycles: CTRL_CYCLES = 4 cycles of
// control word followed by 32 cycles of payload. The counter runs from 0
// to 35 and wraps; cnt 0..3 is the control phase. It restarts at 0 in the
// first cycle after reset is released, so all ports of the switch share
// one frame alignment. Outputs are decoded from the count register, so
// they change one clock edge after the count does.
//
// The 4/36 count follows the design; one counter for all ports and the
// start at reset are this implementation's choices.
module frame_counter #(
  parameter int unsigned CTRL_CYCLES  = xbar_pkg::CTRL_CYCLES,
  parameter int unsigned FRAME_CYCLES = xbar_pkg::FRAME_CYCLES,
  localparam int unsigned CW = $clog2(FRAME_CYCLES)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  output logic [CW-1:0]          cnt,        // cycle within the frame
  output xbar_pkg::frame_phase_e phase,      // control or payload
  output logic                   ctrl_last   // last control cycle (cnt == 3)
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                            cnt <= '0;
    else if (cnt == CW'(FRAME_CYCLES - 1)) cnt <= '0;
    else                                   cnt <= cnt + 1'b1;
  end

  // the count never leaves the frame (checked outside reset; lint notes
  // that rst_n is then also sampled synchronously, by the checker only)
  a_cnt_range: assert property (@(posedge clk) disable iff (!rst_n)
    cnt < CW'(FRAME_CYCLES));

  assign phase     = (cnt < CW'(CTRL_CYCLES)) ? xbar_pkg::PH_CTRL : xbar_pkg::PH_DATA;
  assign ctrl_last = (cnt == CW'(CTRL_CYCLES - 1));

endmodule
