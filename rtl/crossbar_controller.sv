// crossbar_controller: configures the crossbar core from the control words.
//
// The controller owns the frame counter that paces every port's frame
// DMUX. In the cycle after the last control cycle all DMUXes hold their
// port's new control byte; the controller then loads, for every output o,
// the control byte received on port o into the select register of output
// o. So the control byte that arrives on port o names the input port whose
// payload output o carries for this frame; several outputs may name the
// same input (multicast). The select register is loaded in the same cycle
// in which the DMUXes present the first payload word, so select and data
// enter the core together and the core's own select pipeline keeps them
// together through the three MUX stages. out_valid marks the payload
// words at the core output: the DMUX payload flag delayed by the core
// latency (4 cycles).
//
// Control words embedded in the frames and a control path pipelined to
// meet the MUX stages follow the design. Which output a port's control
// byte configures, and a select that is held for the whole frame, are
// this implementation's choices.
module crossbar_controller #(
  parameter int unsigned N            = xbar_pkg::N_PORTS,
  parameter int unsigned CTRL_BITS    = xbar_pkg::CTRL_BITS,
  parameter int unsigned CORE_LATENCY = xbar_pkg::CORE_LATENCY,
  localparam int unsigned CW = $clog2(xbar_pkg::FRAME_CYCLES)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // to and from the frame DMUXes
  output logic [CW-1:0]               frame_cnt,
  output xbar_pkg::frame_phase_e      phase,
  input  logic [N-1:0][CTRL_BITS-1:0] ctrl_byte,
  input  logic                        data_valid,  // DMUX payload flag
  // to the crossbar core
  output logic [N-1:0][CTRL_BITS-1:0] sel,
  output logic                        out_valid    // payload at core output
);

  logic ctrl_last;
  logic load;
  logic [CORE_LATENCY-1:0] vpipe;

  frame_counter u_cnt (
    .clk, .rst_n, .cnt(frame_cnt), .phase, .ctrl_last);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      load  <= 1'b0;
      sel   <= '0;
      vpipe <= '0;
    end else begin
      load  <= ctrl_last;
      if (load) sel <= ctrl_byte;
      vpipe <= {vpipe[CORE_LATENCY-2:0], data_valid};
    end
  end

  assign out_valid = vpipe[CORE_LATENCY-1];

endmodule
