// tb_crossbar_core: self-checking test of the 256 x 256 pipelined core.
//
// Every cycle the core gets random 2-bit words on all inputs and a select
// per output. Most cycles use random selects; every 7th cycle all outputs
// take one input (broadcast, the multicast case), and every 11th cycle
// output o takes input 255-o (a permutation). A reference model computes
// din[sel[o]] from the stimulus history, and dout must show it exactly
// CORE_LATENCY = 4 cycles later, for every output and every cycle. The
// test counts how often each of the four sub-crossbars delivered a
// checked word and fails if one never did. A watchdog ends a hung run.
`timescale 1ns/1ps
module tb_crossbar_core;
  localparam int N = 256, W = 2, SW = 8, CYCLES = 200, LAT = 4;

  logic clk = 1'b0;
  always #0.5 clk = ~clk;

  logic [N-1:0][W-1:0]  din;
  logic [N-1:0][SW-1:0] sel;
  logic [N-1:0][W-1:0]  dout;

  crossbar_core dut (.clk, .din, .sel, .dout);

  int checks = 0, failures = 0;
  int path_hits [4];   // words delivered through sub-crossbar 0..3
  int broadcasts = 0;
  logic [N-1:0][W-1:0]  hist_d [8];
  logic [N-1:0][SW-1:0] hist_s [8];

  // Sub-crossbar that connects input i to output o.
  function automatic int path(int i, int o);
    bit left = (o < 64) || (o >= 192);
    if (i < 128) return left ? 0 : 1;
    else         return left ? 3 : 2;
  endfunction

  initial begin
    for (int k = 0; k < CYCLES; k++) begin
      @(negedge clk);
      if (k >= LAT) begin
        int h;
        h = (k - LAT) % 8;
        for (int o = 0; o < N; o++) begin
          logic [W-1:0] e;
          e = hist_d[h][hist_s[h][o]];
          checks++;
          path_hits[path(int'(hist_s[h][o]), o)]++;
          if (dout[o] !== e) begin
            failures++;
            if (failures < 10) $display("cycle %0d out %0d got %0d exp %0d", k, o, dout[o], e);
          end
        end
      end
      for (int i = 0; i < N; i++) din[i] = W'($urandom);
      if (k % 7 == 3) begin
        logic [SW-1:0] b;
        b = SW'($urandom);
        for (int o = 0; o < N; o++) sel[o] = b;
        broadcasts++;
      end else if (k % 11 == 5) begin
        for (int o = 0; o < N; o++) sel[o] = SW'(N - 1 - o);
      end else begin
        for (int o = 0; o < N; o++) sel[o] = SW'($urandom);
      end
      hist_d[k % 8] = din;
      hist_s[k % 8] = sel;
    end
    for (int p = 0; p < 4; p++) begin
      checks++;
      if (path_hits[p] == 0) begin
        failures++;
        $display("sub-crossbar %0d never used", p);
      end
    end
    $display("sub-crossbar words: %0d %0d %0d %0d, broadcast cycles: %0d",
             path_hits[0], path_hits[1], path_hits[2], path_hits[3], broadcasts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (CYCLES * 4) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
