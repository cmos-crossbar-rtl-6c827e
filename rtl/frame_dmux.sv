// frame_dmux: splits one port's 2-bit stream into control word and data.
//
// During the control phase of the frame (4 cycles) the 2-bit words are
// shifted into an 8-bit control register, the first word landing in bits
// [7:6]. During the payload phase (32 cycles) each word is passed on as
// crossbar data with data_valid high; in the control phase data is 0 and
// data_valid low. Both outputs are registered: a word that enters in
// frame cycle c leaves in the next cycle, and ctrl_byte holds the
// complete control word from the cycle after the last control cycle
// until the next frame's control phase starts to overwrite it.
//
// The split of each frame into one control byte and 64 data bits follows
// the design; the bit order is this implementation's choice.
module frame_dmux #(
  parameter int unsigned W         = xbar_pkg::SLICES,
  parameter int unsigned CTRL_BITS = xbar_pkg::CTRL_BITS
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  xbar_pkg::frame_phase_e phase,
  input  logic [W-1:0]           din,
  output logic [CTRL_BITS-1:0]   ctrl_byte,
  output logic [W-1:0]           data,
  output logic                   data_valid
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctrl_byte  <= '0;
      data       <= '0;
      data_valid <= 1'b0;
    end else begin
      if (phase == xbar_pkg::PH_CTRL)
        ctrl_byte <= {ctrl_byte[CTRL_BITS-W-1:0], din};
      data       <= (phase == xbar_pkg::PH_DATA) ? din : '0;
      data_valid <= (phase == xbar_pkg::PH_DATA);
    end
  end

endmodule
