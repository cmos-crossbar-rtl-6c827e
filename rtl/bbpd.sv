// bbpd: half-rate bang-bang (Alexander) phase detector of one link.
//
// The 2 Gb/s line is sampled with four 1 GHz clock phases 90 degrees
// apart: clk_0 and clk_180 take the two bit centres of a clock period
// (bits A and B), clk_90 and clk_270 take the two bit boundaries (the
// A-B boundary and the boundary between B and the next A). The four
// samples are retimed to clk_0. For each of the two boundaries of a
// period with a data transition, the boundary sample tells on which side
// of the transition the clocks sit: equal to the bit before it means the
// clocks are early, equal to the bit after it means they are late.
//
// Outputs, in the clk_0 domain, two clk_0 edges after the clk_0 edge that
// sampled A: data = {A, B} (the earlier bit in data[1]), and early[k] /
// late[k], the votes of boundary k (0: A-B, 1: B-next A).
//
// The half-rate bang-bang detector producing 2 bits per 1 GHz cycle
// follows the design; the sampling arrangement and vote encoding are the
// textbook Alexander detector, chosen here.
module bbpd (
  input  logic       din,       // 2 Gb/s serial line
  input  logic       clk_0,
  input  logic       clk_90,
  input  logic       clk_180,
  input  logic       clk_270,
  input  logic       rst_n,     // asynchronous, for the clk_0 registers
  output logic [1:0] data,
  output logic [1:0] early,
  output logic [1:0] late
);

  logic s_a, s_e1, s_b, s_e2;   // raw samples, each in its own clock
  logic r_a, r_e1, r_b, r_e2;   // retimed to clk_0, one period older than s_a

  always_ff @(posedge clk_0)   s_a  <= din;
  always_ff @(posedge clk_90)  s_e1 <= din;
  always_ff @(posedge clk_180) s_b  <= din;
  always_ff @(posedge clk_270) s_e2 <= din;

  always_ff @(posedge clk_0) begin
    r_a  <= s_a;
    r_e1 <= s_e1;
    r_b  <= s_b;
    r_e2 <= s_e2;
  end

  // After a clk_0 edge: r_a, r_e1, r_b, r_e2 are bit A, boundary, bit B,
  // boundary of one period, and s_a is the next bit A.
  always_ff @(posedge clk_0 or negedge rst_n) begin
    if (!rst_n) begin
      data  <= '0;
      early <= '0;
      late  <= '0;
    end else begin
      data     <= {r_a, r_b};
      early[0] <= (r_a != r_b) && (r_e1 == r_a);
      late[0]  <= (r_a != r_b) && (r_e1 == r_b);
      early[1] <= (r_b != s_a) && (r_e2 == r_b);
      late[1]  <= (r_b != s_a) && (r_e2 == s_a);
    end
  end

endmodule
