// tb_bbpd: self-checking test of the half-rate bang-bang phase detector.
//
// Four 1 GHz clocks 250 ps apart sample a 2 Gb/s random bit stream. Bit
// 2k (A of period k) is centred on clk_0's rising edge k, bit 2k+1 (B) on
// clk_180's. The stream is shifted against that nominal position in three
// segments: +20 ps (nearly centred), +100 ps (data late, so the clocks are
// early: every transition must give an early vote and none a late one)
// and -100 ps (clocks late: late votes only). Throughout, data must be
// {A, B} after clk_0 edge k+2, and a boundary without a transition must
// give no vote. Periods next to a segment change are not checked.
`timescale 1ps/1ps
module tb_bbpd;
  localparam int PERIOD = 1000, SEG = 300, NPER = 3 * SEG;
  localparam int T0 = PERIOD / 2;   // first clk_0 rising edge

  logic clk_0 = 1'b0, clk_90 = 1'b0, clk_180 = 1'b0, clk_270 = 1'b0;
  always #(PERIOD/2) clk_0 = ~clk_0;
  initial begin #(PERIOD/4);   forever #(PERIOD/2) clk_90  = ~clk_90;  end
  initial begin #(PERIOD/2);   forever #(PERIOD/2) clk_180 = ~clk_180; end
  initial begin #(3*PERIOD/4); forever #(PERIOD/2) clk_270 = ~clk_270; end

  logic din = 1'b0;
  logic rst_n = 1'b0;
  logic [1:0] data, early, late;

  bbpd dut (.din, .clk_0, .clk_90, .clk_180, .clk_270, .rst_n, .data, .early, .late);

  bit bits [2*NPER + 8];

  function automatic int seg_of_period(int k);
    return k / SEG;
  endfunction
  function automatic int shift_of_bit(int j);
    case (seg_of_period(j / 2))
      0:       return 20;
      1:       return 100;
      default: return -100;
    endcase
  endfunction

  int checks = 0, failures = 0, n_early = 0, n_late = 0;

  task automatic check(bit ok, string what, int c);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("period %0d: %s", c, what);
    end
  endtask

  // line driver: bit j starts at T0 + j*PERIOD/2 - PERIOD/4 + shift
  initial begin
    for (int j = 0; j < 2*NPER + 8; j++) bits[j] = 1'($urandom);
    for (int j = 0; j < 2*NPER + 8; j++) begin
      int t;
      t = T0 + j * (PERIOD/2) - PERIOD/4 + shift_of_bit(j);
      if (t > int'($time)) #(t - int'($time));
      din = bits[j];
    end
  end

  initial begin
    #(PERIOD * 2);
    rst_n = 1'b1;
  end

  // observer: after clk_0 edge k+2 the outputs describe period k
  initial begin
    for (int e = 0; e < NPER; e++) begin
      @(negedge clk_0);           // half a period after clk_0 edge e
      if (e >= 4) begin
        int k, s;
        bit a, b, an;
        k  = e - 2;
        s  = seg_of_period(k);
        a  = bits[2*k];
        b  = bits[2*k+1];
        an = bits[2*k+2];
        if (k % SEG >= 2 && k % SEG < SEG - 2) begin
          check(data == {a, b}, "data", k);
          check(!((a == b) && (early[0] || late[0])), "vote 0 without transition", k);
          check(!((b == an) && (early[1] || late[1])), "vote 1 without transition", k);
          if (s == 1) begin
            check(early[0] == (a != b) && !late[0], "vote 0, clocks early", k);
            check(early[1] == (b != an) && !late[1], "vote 1, clocks early", k);
          end else if (s == 2) begin
            check(late[0] == (a != b) && !early[0], "vote 0, clocks late", k);
            check(late[1] == (b != an) && !early[1], "vote 1, clocks late", k);
          end
        end
        n_early += int'(early[0]) + int'(early[1]);
        n_late  += int'(late[0])  + int'(late[1]);
      end
    end
    check(n_early > 0 && n_late > 0, "both vote kinds seen", 0);
    $display("early votes %0d, late votes %0d", n_early, n_late);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(PERIOD * (NPER + 100));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
