`timescale 1ns / 1ps
// tb_rns_dds_top: end-to-end test of the RNS direct digital synthesizer at
// its default parameters.
//
// A cycle model in plain binary arithmetic modulo M runs beside the design:
//   fcw_r <= fcw; phase <= en ? (phase + fcw_r) mod M : phase;
//   y_r   <= (amp * ((phase + ofs + mod) mod M)) mod M;  x_r <= y_r.
// Every clock the test checks the accumulator residues against phase mod
// m_i, the partial sums (their sum mod M must be x_r), the analog output
// (x_out = x_r * V_LSB) and the fold count ((sum - x_r) / M).
// Scenarios: reset; the latency from a new FCW to the output (4 clocks);
// the output frequency (a word of M/32 must give 32-clock sawtooth
// periods, f_out = f_clk * FCW / M); random FCW changes; enable holds;
// phase offset; per-clock modulation; amplitude scaling. Each mechanism is
// counted and must occur at least once.
module tb_rns_dds_top;
  import rns_pkg::*;

  localparam real V_LSB = 1.0e-4;

  logic                        clk = 1'b0;
  logic                        rst_n, en;
  logic [FCW_W-1:0]            fcw;
  logic [N_CH-1:0][RES_W-1:0]  ofs_rns, mod_rns, amp_rns, phase_rns;
  logic [N_CH-1:0][FCW_W-1:0]  ps_code;
  real                         x_out;
  int                          fold_count;

  int unsigned checks = 0, failures = 0;

  // binary values behind the residue inputs
  longint unsigned fcw_b, ofs_b, mod_b, amp_b;
  // cycle model
  longint unsigned m_fcw_r, m_phase, m_y_r, m_x_r;

  // mechanism counters
  int unsigned n_wrap = 0, n_hold = 0, n_ofs = 0, n_mod = 0, n_amp = 0, n_fcw_chg = 0;
  int unsigned n_fold [3] = '{0, 0, 0};

  rns_dds_top dut (
    .clk, .rst_n, .en, .fcw, .ofs_rns, .mod_rns, .amp_rns,
    .phase_rns, .ps_code, .x_out, .fold_count
  );

  always #5 clk = ~clk;

  initial begin
    #(10 * 200000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N_CH-1:0][RES_W-1:0] to_rns(input longint unsigned x);
    for (int c = 0; c < N_CH; c++) to_rns[c] = RES_W'(x % longint'(MODULI[c]));
  endfunction

  task automatic drive();
    fcw     = FCW_W'(fcw_b);
    ofs_rns = to_rns(ofs_b);
    mod_rns = to_rns(mod_b);
    amp_rns = to_rns(amp_b);
  endtask

  // One clock: advance the model with the values present before the edge,
  // then check the design just after the edge.
  task automatic step();
    longint unsigned n_phase, n_y, sum;
    if (fcw_b != m_fcw_r) n_fcw_chg++;
    n_phase = en ? (m_phase + m_fcw_r) % M_TOTAL : m_phase;
    if (en && m_phase + m_fcw_r >= M_TOTAL) n_wrap++;
    if (!en) n_hold++;
    if (ofs_b != 0) n_ofs++;
    if (mod_b != 0) n_mod++;
    if (amp_b != 1) n_amp++;
    n_y     = (amp_b * ((m_phase + ofs_b + mod_b) % M_TOTAL)) % M_TOTAL;
    m_x_r   = m_y_r;
    m_y_r   = n_y;
    m_phase = n_phase;
    m_fcw_r = fcw_b;
    @(posedge clk); #1;
    for (int c = 0; c < N_CH; c++) begin
      checks++;
      if (longint'(phase_rns[c]) != m_phase % longint'(MODULI[c])) begin
        failures++;
        if (failures < 10) $display("%t phase ch%0d: %0d want %0d", $time, c, phase_rns[c],
                                    m_phase % longint'(MODULI[c]));
      end
    end
    sum = 0;
    for (int c = 0; c < N_CH; c++) sum += longint'(ps_code[c]);
    checks += 3;
    if (sum % M_TOTAL != m_x_r) begin
      failures++;
      if (failures < 10) $display("%t partial sums give %0d want %0d", $time, sum % M_TOTAL, m_x_r);
    end
    if ((x_out - real'(m_x_r) * V_LSB > 1.0e-7) || (real'(m_x_r) * V_LSB - x_out > 1.0e-7)) begin
      failures++;
      if (failures < 10) $display("%t x_out %f want %f", $time, x_out, real'(m_x_r) * V_LSB);
    end
    if (longint'(fold_count) != (sum - m_x_r) / M_TOTAL) begin
      failures++;
      if (failures < 10) $display("%t fold_count %0d", $time, fold_count);
    end else if (fold_count >= 0 && fold_count < 3) n_fold[fold_count]++;
  endtask

  initial begin
    int unsigned lat, periods;
    real prev_x;

    // reset
    rst_n = 1'b0; en = 1'b1;
    fcw_b = 0; ofs_b = 0; mod_b = 0; amp_b = 1;
    drive();
    repeat (2) @(posedge clk);
    #1;
    rst_n = 1'b1;
    m_fcw_r = 0; m_phase = 0; m_y_r = 0; m_x_r = 0;
    repeat (3) step();

    // latency: a new FCW first moves the output 4 clocks later
    fcw_b = 1000; drive();
    lat = 0;
    do begin step(); lat++; end while (x_out == 0.0 && lat < 20);
    checks++;
    if (lat != 4) begin failures++; $display("latency %0d clocks, want 4", lat); end
    else $display("FCW to output latency: %0d clocks", lat);

    // output frequency: FCW = M/32 gives one sawtooth period per 32 clocks
    fcw_b = M_TOTAL / 32; drive();
    repeat (8) step();
    periods = 0; prev_x = x_out;
    for (int k = 0; k < 32 * 50; k++) begin
      step();
      if (x_out < prev_x) periods++;
      prev_x = x_out;
    end
    checks++;
    if (periods != 50) begin failures++; $display("%0d periods in 1600 clocks, want 50", periods); end
    else $display("f_out = f_clk * %0d / %0d: %0d periods in 1600 clocks", M_TOTAL / 32, M_TOTAL, periods);

    // random FCW, offset, modulation, amplitude and enable
    for (int seg = 0; seg < 300; seg++) begin
      int unsigned run;
      fcw_b = longint'($urandom) % M_TOTAL;
      case (seg % 4)
        0: begin ofs_b = 0; amp_b = 1; end
        1: begin ofs_b = longint'($urandom) % M_TOTAL; amp_b = 1; end
        2: begin ofs_b = 0; amp_b = 1 + longint'($urandom) % 7; end
        default: begin ofs_b = longint'($urandom) % M_TOTAL; amp_b = longint'($urandom) % M_TOTAL; end
      endcase
      run = 50 + $urandom % 400;
      for (int unsigned k = 0; k < run; k++) begin
        mod_b = (seg % 3 == 2) ? longint'($urandom) % M_TOTAL : 0;
        en    = ($urandom % 16) != 0;
        drive();
        step();
      end
    end

    $display("mechanisms: phase wraps=%0d enable holds=%0d fcw changes=%0d offset=%0d modulation=%0d amplitude=%0d folds0=%0d folds1=%0d folds2=%0d",
             n_wrap, n_hold, n_fcw_chg, n_ofs, n_mod, n_amp, n_fold[0], n_fold[1], n_fold[2]);
    checks += 9;
    if (n_wrap == 0)    begin failures++; $display("no phase wrap"); end
    if (n_hold == 0)    begin failures++; $display("no enable hold"); end
    if (n_fcw_chg == 0) begin failures++; $display("no FCW change"); end
    if (n_ofs == 0)     begin failures++; $display("no phase offset"); end
    if (n_mod == 0)     begin failures++; $display("no modulation"); end
    if (n_amp == 0)     begin failures++; $display("no amplitude scaling"); end
    for (int i = 0; i < 3; i++)
      if (n_fold[i] == 0) begin failures++; $display("fold count %0d never seen", i); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
