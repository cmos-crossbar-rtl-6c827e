// tb_resync: self-checking test of the clock-domain re-synchronisation FIFO.
//
// The write clock has the read clock's 1 ns period but a phase offset of
// 0.3 ns. The writer stores a counting sequence (W = 8 bits here so the
// order can be checked). Once rvalid rises, every read-clock cycle must
// deliver the next number of the sequence, with no slip, and the first
// word must arrive within a few cycles of reset. The phase offset is then
// drifted by 0.6 ns in small steps, which the half-full FIFO must absorb.
// Finally the write clock is stopped: the FIFO runs empty and slip must
// rise and stay high.
`timescale 1ps/1ps
module tb_resync;
  localparam int W = 8;

  logic rclk = 1'b0;
  always #500 rclk = ~rclk;

  logic wclk = 1'b0;
  int   wdelay = 300;     // write clock offset, ps
  bit   wrun   = 1'b1;
  // write clock follows the read clock with a programmable delay
  always @(rclk)
    if (wrun) begin
      automatic logic v = rclk;
      fork
        begin #(wdelay) wclk = v; end
      join_none
    end

  logic rst_n = 1'b0;
  logic [W-1:0] wdata;
  logic [W-1:0] rdata;
  logic rvalid, slip;

  resync #(.W(W)) dut (.wclk, .wrst_n(rst_n), .wdata, .rclk, .rrst_n(rst_n),
                       .rdata, .rvalid, .slip);

  always_ff @(posedge wclk or negedge rst_n)
    if (!rst_n) wdata <= '0;
    else        wdata <= wdata + 1'b1;

  int checks = 0, failures = 0;
  int first_cycle = -1;

  task automatic check(bit ok, string what, int c);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("cycle %0d: %s", c, what);
    end
  endtask

  initial begin
    logic [W-1:0] expect_word;
    int k;
    repeat (3) @(negedge rclk);
    rst_n = 1'b1;
    k = 0;
    while (!rvalid && k < 20) begin @(negedge rclk); k++; end
    first_cycle = k;
    check(rvalid && k <= 8, "rvalid late", k);
    expect_word = rdata;
    check(rdata == 8'd0, "first word is not the first written", k);
    for (int c = 0; c < 200; c++) begin
      @(negedge rclk);
      expect_word = expect_word + 1'b1;
      check(rdata == expect_word, "sequence", c);
      check(!slip, "unexpected slip", c);
      if (c >= 50 && c < 110 && c % 10 == 0) wdelay = wdelay + 100;
    end
    wrun = 1'b0;
    repeat (10) @(negedge rclk);
    check(slip, "slip after write clock stopped", 0);
    $display("first word after %0d cycles", first_cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge rclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
