// resync: moves one port's 2-bit words from its recovered clock to the
// core clock.
//
// The recovered clock of a port has the core clock's frequency (both come
// from the same PLL through the DLL and the phase interpolator) but an
// arbitrary and slowly moving phase. A 4-entry FIFO with Gray-coded
// pointers absorbs that phase: the write side stores one word on every
// recovered-clock edge; each pointer crosses to the other clock domain
// through two flip-flops. The read side waits until START_FILL words are
// in the FIFO and from then on reads one word per core cycle, so the
// FIFO sits half full and tolerates up to about one cycle of phase drift
// either way. If it ever finds the FIFO empty it repeats the last word
// and raises the sticky flag slip, which only reset clears.
//
// Interface: wdata is sampled on wclk; rdata/rvalid change on rclk;
// rvalid stays high once reading has started. Latency from write to read
// is about 3 to 4 core cycles, depending on the clock phase.
//
// The design only says that each input is re-synchronised to the main
// clock; the FIFO and its depth are this implementation's choices.
module resync #(
  parameter int unsigned W          = xbar_pkg::SLICES,
  parameter int unsigned START_FILL = 2
) (
  input  logic         wclk,
  input  logic         wrst_n,
  input  logic [W-1:0] wdata,
  input  logic         rclk,
  input  logic         rrst_n,
  output logic [W-1:0] rdata,
  output logic         rvalid,
  output logic         slip
);

  localparam int unsigned DEPTH = 4;
  localparam int unsigned PW    = $clog2(DEPTH) + 1;   // pointer with wrap bit

  function automatic logic [PW-1:0] bin2gray(logic [PW-1:0] b);
    return b ^ (b >> 1);
  endfunction
  function automatic logic [PW-1:0] gray2bin(logic [PW-1:0] g);
    logic [PW-1:0] b;
    for (int i = PW - 1; i >= 0; i--)
      b[i] = (i == PW - 1) ? g[i] : (b[i+1] ^ g[i]);
    return b;
  endfunction

  logic [DEPTH-1:0][W-1:0] mem;

  // ---- write side (recovered clock) ---------------------------------
  logic [PW-1:0] wptr, wptr_gray;

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wptr      <= '0;
      wptr_gray <= '0;
    end else begin
      wptr      <= wptr + 1'b1;
      wptr_gray <= bin2gray(wptr + 1'b1);
    end
  end

  always_ff @(posedge wclk) mem[wptr[PW-2:0]] <= wdata;

  // ---- read side (core clock) ---------------------------------------
  logic [PW-1:0] wgray_s1, wgray_s2;  // synchroniser
  logic [PW-1:0] rptr;
  logic [PW-1:0] fill;
  logic          empty;

  assign fill  = gray2bin(wgray_s2) - rptr;
  assign empty = (fill == '0);

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      wgray_s1 <= '0;
      wgray_s2 <= '0;
      rptr     <= '0;
      rdata    <= '0;
      rvalid   <= 1'b0;
      slip     <= 1'b0;
    end else begin
      wgray_s1 <= wptr_gray;
      wgray_s2 <= wgray_s1;
      if (!rvalid) begin
        if (fill >= PW'(START_FILL)) begin
          rvalid <= 1'b1;
          rdata  <= mem[rptr[PW-2:0]];
          rptr   <= rptr + 1'b1;
        end
      end else if (empty) begin
        slip <= 1'b1;
      end else begin
        rdata <= mem[rptr[PW-2:0]];
        rptr  <= rptr + 1'b1;
      end
    end
  end

  // the writer can never be more than DEPTH words ahead of the reader
  // (checked outside reset; the checker samples rrst_n synchronously)
  a_no_overflow: assert property (@(posedge rclk) disable iff (!rrst_n)
    fill <= PW'(DEPTH));

endmodule
