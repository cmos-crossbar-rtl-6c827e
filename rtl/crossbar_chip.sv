// crossbar_chip: 256-port, 2 Gb/s-per-port CMOS crossbar switch.
//
// Each port receives a 2 Gb/s serial line. Its receive front end samples
// the line with four 1 GHz clock phases from the port's phase
// interpolator (bang-bang detector, bbpd), turns the detector's votes into
// a phase code for that interpolator (cdr_fsm), and moves the resulting
// 2-bit words to the 1 GHz core clock (resync). The words of every port
// form 36-cycle frames: a control byte in 4 cycles, then 64 payload bits
// in 32 cycles. A per-port frame_dmux, paced by the controller's 4/36
// counter, strips the control byte; the controller loads it as the select
// of the output with the same number; the 2-bit payload words go through
// the 3-stage pipelined MUX crossbar core.
//
// Outside this module (analog, not modelled): the PLL that makes clk from
// the 250 MHz system clock, the DLL and the per-port phase selector and
// interpolator that make rx_clk from clk under control of rx_phase_code,
// and the clock tree.
//
// Interface and timing:
//   rx_din[p]        serial line of port p, 2 bits per rx_clk[p] period
//   rx_clk[p][k]     sampling clocks of port p, k*90 degrees, same frequency as clk
//   rx_phase_code[p] interpolator code of port p (rx_clk[p][0] domain)
//   rx_ready[p]      port p's re-synchronisation FIFO has started delivering
//   rx_slip[p]       sticky: port p's re-synchronisation FIFO ran empty
//   frame_cnt        cycle of the frame now at the DMUX inputs (0..35)
//   tx_data[o]       2-bit payload word of output o; tx_valid marks payload
// A payload word that reaches a DMUX in frame cycle c leaves on tx_data
// 5 core cycles later (1 DMUX register + 4 core stages); the 32 payload
// words of a frame leave back to back with tx_valid high, and tx_data[o]
// carries the payload of the input named by the control byte that port o
// sent in the same frame.
//
// The step pulses of the loop filters and the payload flags of ports
// 1..N-1 are left unconnected on purpose: the interpolator takes the code
// itself, and all DMUXes share one counter, so port 0's flag stands for all.
//
// The block partition follows the design; resets (one asynchronous
// rst_n for all clock domains) are this implementation's choice.
module crossbar_chip #(
  parameter int unsigned N       = xbar_pkg::N_PORTS,
  parameter int unsigned PHASE_W = 6,
  localparam int unsigned W  = xbar_pkg::SLICES,
  localparam int unsigned CB = xbar_pkg::CTRL_BITS,
  localparam int unsigned CW = $clog2(xbar_pkg::FRAME_CYCLES)
) (
  input  logic                       clk,      // 1 GHz core clock
  input  logic                       rst_n,
  input  logic [N-1:0]               rx_din,
  input  logic [N-1:0][3:0]          rx_clk,
  output logic [N-1:0][PHASE_W-1:0]  rx_phase_code,
  output logic [N-1:0]               rx_ready,
  output logic [N-1:0]               rx_slip,
  output logic [CW-1:0]              frame_cnt,
  output logic [N-1:0][W-1:0]        tx_data,
  output logic                       tx_valid
);

  xbar_pkg::frame_phase_e phase;
  logic [N-1:0][W-1:0]    rx_word;      // recovered words, core clock
  logic [N-1:0][CB-1:0]   ctrl_byte;
  logic [N-1:0][W-1:0]    core_din;
  logic [N-1:0]           dmux_valid;
  logic [N-1:0][CB-1:0]   sel;

  for (genvar p = 0; p < N; p++) begin : g_port
    logic [W-1:0] bb_data;
    logic [1:0]   bb_early, bb_late;
    logic         step_up, step_dn;   // interpolator steps, brought to no port

    bbpd u_bbpd (
      .din(rx_din[p]),
      .clk_0(rx_clk[p][0]), .clk_90(rx_clk[p][1]),
      .clk_180(rx_clk[p][2]), .clk_270(rx_clk[p][3]),
      .rst_n,
      .data(bb_data), .early(bb_early), .late(bb_late));

    cdr_fsm #(.PHASE_W(PHASE_W)) u_fsm (
      .clk(rx_clk[p][0]), .rst_n,
      .early(bb_early), .late(bb_late),
      .phase_code(rx_phase_code[p]), .step_up, .step_dn);

    resync #(.W(W)) u_resync (
      .wclk(rx_clk[p][0]), .wrst_n(rst_n), .wdata(bb_data),
      .rclk(clk), .rrst_n(rst_n),
      .rdata(rx_word[p]), .rvalid(rx_ready[p]), .slip(rx_slip[p]));

    frame_dmux #(.W(W)) u_dmux (
      .clk, .rst_n, .phase,
      .din(rx_word[p]),
      .ctrl_byte(ctrl_byte[p]), .data(core_din[p]),
      .data_valid(dmux_valid[p]));
  end

  crossbar_controller #(.N(N)) u_ctrl (
    .clk, .rst_n,
    .frame_cnt, .phase,
    .ctrl_byte,
    .data_valid(dmux_valid[0]),   // same for all ports: one shared counter
    .sel,
    .out_valid(tx_valid));

  crossbar_core #(.N(N), .W(W)) u_core (
    .clk, .din(core_din), .sel, .dout(tx_data));

endmodule
