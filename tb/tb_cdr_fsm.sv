// tb_cdr_fsm: self-checking test of the periphery loop filter.
//
// Random early/late votes are applied for 2000 cycles with a bias that
// changes every 250 cycles (mostly late, mostly early, balanced). An
// independent integer model adds +1 per late and -1 per early vote, steps
// the code down at +4 and up at -4 (clearing the sum) and must agree with
// phase_code, step_up and step_dn after every clock edge. The code must
// have moved both ways, and it must wrap around at least once.
`timescale 1ns/1ps
module tb_cdr_fsm;
  localparam int PW = 6, TH = 4, CYCLES = 2000;

  logic clk = 1'b0;
  always #0.5 clk = ~clk;
  logic rst_n = 1'b0;
  logic [1:0] early, late;
  logic [PW-1:0] phase_code;
  logic step_up, step_dn;

  cdr_fsm #(.PHASE_W(PW), .THRESHOLD(TH)) dut (
    .clk, .rst_n, .early, .late, .phase_code, .step_up, .step_dn);

  int checks = 0, failures = 0, ups = 0, dns = 0, wraps = 0;

  task automatic check(bit ok, string what, int c);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("cycle %0d: %s", c, what);
    end
  endtask

  initial begin
    int acc, code;
    bit eu, ed;
    early = '0; late = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    acc = 0; code = 0; eu = 0; ed = 0;
    for (int k = 0; k < CYCLES; k++) begin
      int bias;
      check(phase_code == PW'(code), "phase_code", k);
      check(step_up == eu && step_dn == ed, "step pulses", k);
      bias = (k / 250) % 3;   // 0: late, 1: early, 2: balanced
      for (int i = 0; i < 2; i++) begin
        int r;
        r = int'($urandom_range(0, 99));
        early[i] = (bias == 1) ? (r < 60) : (bias == 0) ? (r < 10) : (r < 30);
        late[i]  = !early[i] && ((bias == 0) ? (r >= 40) : (bias == 1) ? (r >= 90) : (r >= 70));
      end
      acc += int'(late[0]) + int'(late[1]) - int'(early[0]) - int'(early[1]);
      eu = 0; ed = 0;
      if (acc >= TH) begin
        acc = 0; ed = 1; dns++;
        if (code == 0) wraps++;
        code = (code + (1 << PW) - 1) % (1 << PW);
      end else if (acc <= -TH) begin
        acc = 0; eu = 1; ups++;
        if (code == (1 << PW) - 1) wraps++;
        code = (code + 1) % (1 << PW);
      end
      @(negedge clk);
    end
    check(ups > 0 && dns > 0, "code moved both ways", 0);
    check(wraps > 0, "code wrapped", 0);
    $display("steps up %0d, down %0d, wraps %0d", ups, dns, wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (CYCLES * 2) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
