// tb_crossbar_chip: end-to-end test of the whole switch at full size
// (256 ports, default parameters).
//
// The testbench plays 256 line cards. Each sends a 2 Gb/s serial stream:
// idle (zeros), then FRAMES frames of 72 bits (control byte, 64 payload
// bits), aligned so that every frame's first word reaches the DMUXes when
// the switch's frame count is 0. All ports share four 1 GHz sampling
// clocks (90 degrees apart, 300 ps behind the core clock); even ports send
// their bits 100 ps late and odd ports 100 ps early, so the clock-recovery
// loops of even ports must step their phase code up and those of odd
// ports down.
//
// Frames: 1 random selects, 2 multicast (every 4th output takes input
// 77), 3 reversal (output o takes input 255-o), 4 random. For every
// output and payload word of frames 1..FRAMES the testbench checks that
// tx_data carries the payload of the input named by the output's own
// control byte, and that tx_valid is high exactly for the 32 payload
// cycles, 5 core cycles after the word entered the DMUX (frame count 9
// for the first payload word). It also checks the frame count, rx_ready
// and rx_slip. Each mechanism must occur at least once: select reloads,
// multicast, each of the four sub-crossbars, phase steps up and down.
//
// RX_LAT relates the two counts the testbench keeps: a word sent in c0
// period k reaches the DMUX in core cycle k + RX_LAT (core cycles counted
// from the fifth falling clock edge). It holds for this clock phase; the
// re-synchronisation FIFO fixes it at start-up.
`timescale 1ps/1ps
module tb_crossbar_chip;
  localparam int N = 256, FRAMES = 4, PW = 6;
  localparam int PERIOD = 1000, RX_OFS = 300;
  localparam int RX_LAT = 3;
  localparam int SKEW = 100;

  logic clk = 1'b0;
  always #(PERIOD/2) clk = ~clk;      // rising edges at 500 + 1000 m

  logic c0 = 1'b0, c90 = 1'b0, c180 = 1'b0, c270 = 1'b0;
  initial begin #(RX_OFS);              forever #(PERIOD/2) c0   = ~c0;   end
  initial begin #(RX_OFS + PERIOD/4);   forever #(PERIOD/2) c90  = ~c90;  end
  initial begin #(RX_OFS + PERIOD/2);   forever #(PERIOD/2) c180 = ~c180; end
  initial begin #(RX_OFS + 3*PERIOD/4); forever #(PERIOD/2) c270 = ~c270; end
  // c0 rising edge k at T_k = RX_OFS + PERIOD/2 + k*PERIOD

  logic                  rst_n = 1'b0;
  logic [N-1:0]          rx_din = '0;
  logic [N-1:0][3:0]     rx_clk;
  logic [N-1:0][PW-1:0]  rx_phase_code;
  logic [N-1:0]          rx_ready, rx_slip;
  logic [5:0]            frame_cnt;
  logic [N-1:0][1:0]     tx_data;
  logic                  tx_valid;

  for (genvar p = 0; p < N; p++) begin : g_clk
    assign rx_clk[p] = {c270, c180, c90, c0};
  end

  crossbar_chip dut (
    .clk, .rst_n, .rx_din, .rx_clk, .rx_phase_code, .rx_ready, .rx_slip,
    .frame_cnt, .tx_data, .tx_valid);

  // ---- stimulus tables ------------------------------------------------
  logic [7:0]  ctrl    [FRAMES+1][N];
  logic [63:0] payload [FRAMES+1][N];

  initial begin
    for (int f = 1; f <= FRAMES; f++)
      for (int p = 0; p < N; p++) begin
        payload[f][p] = {$urandom, $urandom};
        case (f)
          2:       ctrl[f][p] = (p % 4 == 0) ? 8'd77 : 8'($urandom);
          3:       ctrl[f][p] = 8'(N - 1 - p);
          default: ctrl[f][p] = 8'($urandom);
        endcase
      end
  end

  int m = 0;            // core cycle, counted at falling clock edges
  int m_zero = -1000;   // core cycle in which the frame count was 0
  bit aligned = 1'b0;

  // 2-bit word that a port sends in c0 period k
  function automatic logic [1:0] word_of(int p, int k);
    int pos, fr, c;
    if (!aligned) return 2'b00;
    pos = k + RX_LAT - m_zero;
    if (pos < 0) return 2'b00;
    fr = pos / 36;
    c  = pos % 36;
    if (fr < 1 || fr > FRAMES) return 2'b00;
    if (c < 4) return ctrl[fr][p][7 - 2*c -: 2];
    return payload[fr][p][2*(c-4) + 1 -: 2];
  endfunction

  // ---- line drivers ---------------------------------------------------
  // bit A of period k is centred at T_k, bit B at T_k + PERIOD/2; even
  // ports are shifted by +SKEW, odd ports by -SKEW.
  initial begin
    logic [N-1:0][1:0] w;
    for (int k = 0; ; k++) begin
      int tk;
      tk = RX_OFS + PERIOD/2 + k*PERIOD;
      for (int p = 0; p < N; p++) w[p] = word_of(p, k);
      #(tk - PERIOD/4 - SKEW - int'($time));
      for (int p = 1; p < N; p += 2) rx_din[p] = w[p][1];
      #(2*SKEW);
      for (int p = 0; p < N; p += 2) rx_din[p] = w[p][1];
      #(PERIOD/2 - 2*SKEW);
      for (int p = 1; p < N; p += 2) rx_din[p] = w[p][0];
      #(2*SKEW);
      for (int p = 0; p < N; p += 2) rx_din[p] = w[p][0];
    end
  end

  // ---- checking ---------------------------------------------------------
  int checks = 0, failures = 0;
  int sel_loads = 0, multicast = 0;
  int sub_hits [4];
  int steps_up [N], steps_dn [N], wrong_steps = 0;
  logic [N-1:0][PW-1:0] prev_code;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 12) $display("cycle %0d: %s", m, what);
    end
  endtask

  function automatic int sub_of(int i, int o);
    bit left = (o < 64) || (o >= 192);
    if (i < 128) return left ? 0 : 1;
    else         return left ? 3 : 2;
  endfunction

  localparam int LAST_M = 60 + 36 * (FRAMES + 2);

  initial begin
    repeat (5) @(negedge clk);
    rst_n = 1'b1;
    prev_code = '0;
    forever begin
      @(negedge clk);
      m++;
      if (!aligned && m > 8) begin
        m_zero  = m - int'(frame_cnt);
        aligned = 1'b1;
      end
      if (aligned) begin
        int pos, fr, c;
        check(int'(frame_cnt) == (m - m_zero) % 36, "frame count");
        pos = m - 5 - m_zero;
        fr  = pos / 36;
        c   = pos % 36;
        if (pos >= 0 && fr >= 1 && fr <= FRAMES) begin
          check(tx_valid == (c >= 4), "tx_valid");
          if (c >= 4) begin
            for (int o = 0; o < N; o++) begin
              int i;
              logic [1:0] e;
              i = int'(ctrl[fr][o]);
              e = payload[fr][i][2*(c-4) + 1 -: 2];
              checks++;
              sub_hits[sub_of(i, o)]++;
              if (tx_data[o] !== e) begin
                failures++;
                if (failures < 12)
                  $display("cycle %0d frame %0d word %0d out %0d: got %0d exp %0d (input %0d)",
                           m, fr, c - 4, o, tx_data[o], e, i);
              end
            end
          end
          if (c == 4) begin
            sel_loads++;
            begin
              int uses [N];
              bit mc;
              mc = 1'b0;
              for (int o = 0; o < N; o++) uses[o] = 0;
              for (int o = 0; o < N; o++) begin
                uses[ctrl[fr][o]]++;
                if (uses[ctrl[fr][o]] > 1) mc = 1'b1;
              end
              if (mc) multicast++;
            end
          end
        end
      end
      // clock-recovery codes: even ports must only step up, odd only down
      for (int p = 0; p < N; p++) begin
        if (rx_phase_code[p] == prev_code[p] + 1'b1) steps_up[p]++;
        else if (rx_phase_code[p] == prev_code[p] - 1'b1) steps_dn[p]++;
        else if (rx_phase_code[p] != prev_code[p]) wrong_steps++;
      end
      prev_code = rx_phase_code;
      if (m == LAST_M) break;
    end

    // ---- end of run ----------------------------------------------------
    check(wrong_steps == 0, "phase code jumped by more than one step");
    begin
      int even_ok, odd_ok;
      even_ok = 0; odd_ok = 0;
      for (int p = 0; p < N; p++) begin
        if (p % 2 == 0 && steps_up[p] > 0 && steps_dn[p] == 0) even_ok++;
        if (p % 2 == 1 && steps_dn[p] > 0 && steps_up[p] == 0) odd_ok++;
      end
      check(even_ok == N/2, "even ports (clocks early) must step the phase code up");
      check(odd_ok  == N/2, "odd ports (clocks late) must step the phase code down");
      $display("phase steps: port 0 up %0d, port 1 down %0d", steps_up[0], steps_dn[1]);
    end
    check(&rx_ready, "all re-synchronisers delivering");
    check(rx_slip == '0, "no re-synchroniser slip");
    check(sel_loads == FRAMES, "one select load per frame");
    check(multicast > 0, "multicast frame seen");
    for (int s = 0; s < 4; s++) check(sub_hits[s] > 0, "every sub-crossbar used");
    $display("frames %0d, multicast frames %0d, words per sub-crossbar %0d %0d %0d %0d",
             sel_loads, multicast, sub_hits[0], sub_hits[1], sub_hits[2], sub_hits[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(PERIOD * (LAST_M + 100));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
