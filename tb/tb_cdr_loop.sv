// tb_cdr_loop: closed clock-recovery loop of one port.
//
// The bang-bang detector and the loop filter drive a behavioural phase
// interpolator, whose four clocks sample a random 2 Gb/s stream. The
// stream's bit centres sit at an arbitrary offset from the reference
// clock, different in each of three runs. The loop must lock: after the
// settling time the phase code may only dither within a few steps, the
// implied sampling instant of clk_0 must lie within 3 steps of a bit
// centre, and the recovered words must equal the sent bits (at one fixed
// bit offset, found once after settling) without error.
`timescale 1ps/1ps
module tb_cdr_loop;
  localparam int PERIOD = 1000, PW = 6, STEP = PERIOD >> PW;
  localparam int SETTLE = 400, RUN = 600;

  logic ref_clk = 1'b0;
  always #(PERIOD/2) ref_clk = ~ref_clk;   // rising edges at 500 + 1000 m

  logic rst_n = 1'b0;
  logic din = 1'b0;
  logic c0, c90, c180, c270;
  logic [1:0] data, early, late;
  logic [PW-1:0] code;
  logic su, sd;

  phase_interp_model #(.PERIOD_PS(PERIOD), .PHASE_W(PW)) u_pi (
    .ref_clk, .code, .clk_0(c0), .clk_90(c90), .clk_180(c180), .clk_270(c270));
  bbpd u_pd (.din, .clk_0(c0), .clk_90(c90), .clk_180(c180), .clk_270(c270),
             .rst_n, .data, .early, .late);
  cdr_fsm #(.PHASE_W(PW)) u_fsm (.clk(c0), .rst_n, .early, .late,
                                 .phase_code(code), .step_up(su), .step_dn(sd));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("%0t: %s", $time, what);
    end
  endtask

  localparam int NB = 2 * (SETTLE + RUN + 50);
  bit bits [NB];
  int offset;          // centre of bit 0, ps
  bit running = 1'b0;

  // distance of t from the nearest bit centre
  function automatic int centre_err(int t);
    int r;
    r = ((t - offset) % (PERIOD/2) + PERIOD/2) % (PERIOD/2);
    return (r > PERIOD/4) ? r - PERIOD/2 : r;
  endfunction

  task automatic run_case(int ofs);
    int t_start, min_code, max_code, lag, kmax;
    bit found;
    offset = ofs;
    for (int j = 0; j < NB; j++) bits[j] = 1'($urandom);
    rst_n = 1'b0;
    #(3*PERIOD);
    t_start = int'($time);
    offset  = t_start + ofs;
    fork
      begin : line
        for (int j = 0; j < NB; j++) begin
          int t;
          t = offset + j * (PERIOD/2) - PERIOD/4;
          if (t > int'($time)) #(t - int'($time));
          din = bits[j];
        end
      end
      begin : watch
        logic [1:0] rx [$];
        rst_n = 1'b1;
        repeat (SETTLE) @(posedge c0);
        min_code = 1 << PW; max_code = -1;
        for (int k = 0; k < RUN; k++) begin
          @(posedge c0);
          rx.push_back(data);
          if (int'(code) < min_code) min_code = int'(code);
          if (int'(code) > max_code) max_code = int'(code);
          check(centre_err(int'($time)) <= 3 * STEP && centre_err(int'($time)) >= -3 * STEP,
                "clk_0 not within 3 steps of a bit centre");
        end
        check(max_code - min_code <= 4 || max_code - min_code >= (1 << PW) - 5,
              "phase code wanders after lock");
        // recovered words against the sent stream at one bit offset
        found = 1'b0;
        kmax = int'(rx.size());
        lag = 0;
        for (int l = 0; l < NB - 2 * kmax && !found; l++) begin
          bit ok;
          ok = 1'b1;
          for (int k = 0; k < kmax && ok; k++)
            if (rx[k] != {bits[l + 2*k], bits[l + 2*k + 1]}) ok = 1'b0;
          if (ok) begin found = 1'b1; lag = l; end
        end
        check(found, "recovered data does not match the sent stream");
        checks += kmax;   // every word compared
        $display("offset %0d ps: code %0d..%0d, data lag %0d bits", ofs, min_code, max_code, lag);
      end
    join_any
    disable fork;
  endtask

  initial begin
    run_case(130);
    run_case(460);
    run_case(777);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(PERIOD * 3 * (SETTLE + RUN + 200));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
