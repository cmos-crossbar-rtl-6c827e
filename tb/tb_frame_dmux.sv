// tb_frame_dmux: self-checking test of the per-port frame DMUX.
//
// The testbench keeps its own 36-cycle frame count (control phase in
// cycles 0..3) and feeds random 2-bit words. It checks that in the payload
// phase every word comes out one cycle later with data_valid high, that
// in the control phase data is 0 and data_valid low, and that after the
// fourth control word ctrl_byte holds the four words in arrival order,
// first word in bits [7:6], for the whole payload phase.
`timescale 1ns/1ps
module tb_frame_dmux;
  import xbar_pkg::*;
  localparam int FRAMES = 6;

  logic clk = 1'b0;
  always #0.5 clk = ~clk;
  logic rst_n = 1'b0;

  frame_phase_e phase;
  logic [1:0]   din;
  logic [7:0]   ctrl_byte;
  logic [1:0]   data;
  logic         data_valid;

  frame_dmux dut (.clk, .rst_n, .phase, .din, .ctrl_byte, .data, .data_valid);

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what, int c);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("cycle %0d: %s", c, what);
    end
  endtask

  initial begin
    logic [1:0] prev_din;
    logic       prev_data;
    logic [7:0] exp_ctrl;
    phase = PH_CTRL;
    din   = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    prev_din  = '0;
    prev_data = 1'b0;
    exp_ctrl  = '0;
    for (int k = 0; k < FRAMES * int'(FRAME_CYCLES); k++) begin
      int c;
      c = k % int'(FRAME_CYCLES);
      // outputs reflect the word driven one cycle earlier
      if (k > 0) begin
        check(data_valid == prev_data, "data_valid", k);
        check(data == (prev_data ? prev_din : 2'b00), "data", k);
        if (c >= int'(CTRL_CYCLES) || c == 0)
          check(ctrl_byte == exp_ctrl, "ctrl_byte", k);
      end
      phase = (c < int'(CTRL_CYCLES)) ? PH_CTRL : PH_DATA;
      din   = 2'($urandom);
      if (phase == PH_CTRL) exp_ctrl = {exp_ctrl[5:0], din};
      prev_din  = din;
      prev_data = (phase == PH_DATA);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (FRAMES * 36 * 4) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
