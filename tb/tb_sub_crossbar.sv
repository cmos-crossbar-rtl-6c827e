// tb_sub_crossbar: self-checking test of the 128 x 128 sub-crossbar.
//
// A near (OUT_REG = 1) and a far (OUT_REG = 0) instance get the same
// random input words and a fresh random select for every output in every
// cycle. A reference model keeps the recent stimulus and computes
// din[sel[o]] directly; the near instance must show it 2 cycles later,
// the far one 1 cycle later. Every output of every cycle is compared.
// Selects that change every cycle make sure that the stage-B select is
// delayed to match its data. A watchdog ends the run if it hangs.
`timescale 1ns/1ps
module tb_sub_crossbar;
  localparam int N = 128, W = 2, SW = 7, CYCLES = 300;

  logic clk = 1'b0;
  always #0.5 clk = ~clk;

  logic [N-1:0][W-1:0]  din;
  logic [N-1:0][SW-1:0] sel;
  logic [N-1:0][W-1:0]  dout_near, dout_far;

  sub_crossbar #(.N_IN(N), .N_OUT(N), .W(W), .OUT_REG(1'b1)) dut_near (
    .clk, .din, .sel, .dout(dout_near));
  sub_crossbar #(.N_IN(N), .N_OUT(N), .W(W), .OUT_REG(1'b0)) dut_far (
    .clk, .din, .sel, .dout(dout_far));

  int checks = 0, failures = 0;
  logic [N-1:0][W-1:0]  hist_d [4];
  logic [N-1:0][SW-1:0] hist_s [4];

  function automatic logic [N-1:0][W-1:0] model(int k);
    logic [N-1:0][W-1:0] r;
    for (int o = 0; o < N; o++) r[o] = hist_d[k % 4][hist_s[k % 4][o]];
    return r;
  endfunction

  initial begin
    for (int k = 0; k < CYCLES; k++) begin
      @(negedge clk);
      if (k >= 2) begin
        logic [N-1:0][W-1:0] en, ef;
        en = model(k - 2);
        ef = model(k - 1);
        for (int o = 0; o < N; o++) begin
          checks += 2;
          if (dout_near[o] !== en[o]) begin
            failures++;
            if (failures < 10) $display("near: cycle %0d out %0d got %0d exp %0d", k, o, dout_near[o], en[o]);
          end
          if (dout_far[o] !== ef[o]) begin
            failures++;
            if (failures < 10) $display("far: cycle %0d out %0d got %0d exp %0d", k, o, dout_far[o], ef[o]);
          end
        end
      end
      for (int i = 0; i < N; i++) begin
        din[i] = W'($urandom);
        sel[i] = SW'($urandom);
      end
      hist_d[k % 4] = din;
      hist_s[k % 4] = sel;
    end
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
