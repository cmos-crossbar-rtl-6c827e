// tb_crossbar_controller: self-checking test of the controller.
//
// After reset the frame count must run 0, 1, ..., 35, 0, ... with the
// control phase in counts 0..3. The testbench plays the DMUXes: it drives
// a fresh random control byte per port every cycle and a payload flag
// that is the registered payload phase. The select of output o must take
// the byte of port o that is present while the count is 4 (the cycle after
// the DMUXes finish the control word) and hold it for the whole frame;
// out_valid must be the payload flag 4 cycles later.
`timescale 1ns/1ps
module tb_crossbar_controller;
  import xbar_pkg::*;
  localparam int N = 256, FRAMES = 5;

  logic clk = 1'b0;
  always #0.5 clk = ~clk;
  logic rst_n = 1'b0;

  logic [5:0]          frame_cnt;
  frame_phase_e        phase;
  logic [N-1:0][7:0]   ctrl_byte;
  logic                data_valid;
  logic [N-1:0][7:0]   sel;
  logic                out_valid;

  crossbar_controller dut (.clk, .rst_n, .frame_cnt, .phase, .ctrl_byte,
                           .data_valid, .sel, .out_valid);

  int checks = 0, failures = 0, loads = 0;

  task automatic check(bit ok, string what, int c);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("cycle %0d: %s", c, what);
    end
  endtask

  initial begin
    logic [N-1:0][7:0] exp_sel;
    logic [7:0]        vhist;   // payload flag history, bit 0 newest
    data_valid = 1'b0;
    ctrl_byte  = '0;
    exp_sel    = '0;
    vhist      = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < FRAMES * 36; k++) begin
      check(frame_cnt == 6'(k % 36), "frame_cnt", k);
      check(phase == ((k % 36) < 4 ? PH_CTRL : PH_DATA), "phase", k);
      check(sel == exp_sel, "sel", k);
      check(out_valid == vhist[3], "out_valid", k);
      ctrl_byte = '0;
      for (int p = 0; p < N; p++) ctrl_byte[p] = 8'($urandom);
      if (frame_cnt == 6'd4) begin
        exp_sel = ctrl_byte;
        loads++;
      end
      // DMUX payload flag: registered payload phase
      vhist = {vhist[6:0], data_valid};
      @(posedge clk);
      data_valid <= (phase == PH_DATA);
      @(negedge clk);
    end
    check(loads == FRAMES, "select loads", 0);
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
