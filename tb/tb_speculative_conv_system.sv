// tb_speculative_conv_system: end-to-end test of the whole accelerator at its
// default size (16-bit words, 32 x 32 x 13 x 13 tiles, K = 3, 8 x 8
// multipliers), playing the role of the host software and data mover.
//
// The accelerator clock comes from clock_wizard_model: overclocked at
// 125.0 MHz against a system clock of 100 MHz. Sequence:
//   tile A  overclocked, no fault          -> outputs correct, no error
//   tile B  overclocked, a timing error is imitated by flipping bit 15 of
//           one word in the output buffer  -> error reported
//   recovery: clock reprogrammed to the safe 100.0 MHz, tile B sent again
//                                          -> outputs correct, no error
//           then the clock is reprogrammed back to 125.0 MHz
//   tiles C and D, overclocked, sent back to back (D is offered while C is
//           computing)                     -> outputs correct, no error
// Every output word of an accepted tile is compared with a direct
// evaluation of the convolution (modulo 2^16). The COMPUTE phase must last
// exactly TM/UM*TN/UN*K*K*TR*TC = 24336 accelerator cycles. Counted
// mechanisms, each of which must happen at least once: checksum match,
// checksum mismatch, safe re-execution, clock reprogramming, input
// back-pressure (the data mover stalled by a full FIFO) and output
// back-pressure (the accelerator stalled by the data mover).
module tb_speculative_conv_system;
  import conv_pkg::*;
  localparam int unsigned WL = DEF_WL, K = DEF_K, TM = DEF_TM, TN = DEF_TN;
  localparam int unsigned TR = DEF_TR, TC = DEF_TC, UM = DEF_UM, UN = DEF_UN;
  localparam int unsigned RI = TR + K - 1, CI = TC + K - 1;
  localparam int unsigned NWW = TM * TN * K * K, NXW = TN * RI * CI;
  localparam int unsigned BEATS = TM / UM * TR * TC;
  localparam int unsigned COMPUTE_CYCLES = TM / UM * TN / UN * K * K * TR * TC;
  localparam logic [15:0] F_OVER = 16'd1250, F_SAFE = 16'd1000;  // 0.1 MHz units

  logic clk_sys = 0, rst_sys_n = 1, rst_acc_n = 1;
  logic clk_acc, locked;
  logic [15:0] freq;
  logic reprogram = 0;
  logic [WL-1:0] s_in_data;
  logic s_in_valid, s_in_ready, s_out_valid, s_out_ready, tile_done, tile_error;
  logic [UM*WL-1:0] s_out_data;
  conv_phase_e acc_phase;

  int checks = 0, failures = 0;
  int n_match = 0, n_mismatch = 0, n_reexec = 0, n_reprogram = 0;
  int n_in_stall = 0, n_out_stall = 0;
  int compute_cnt = 0;
  int n_done = 0;
  bit last_err;

  always #5 clk_sys = ~clk_sys;
  clock_wizard_model #(.LOCK_NS(300.0)) u_wiz (.freq_100khz(freq), .reprogram, .clk_out(clk_acc), .locked);

  speculative_conv_system dut (.*);

  task automatic bump(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk_acc) if (rst_acc_n && acc_phase == PH_COMPUTE) compute_cnt++;
  always @(posedge clk_sys) if (rst_sys_n) begin
    if (s_in_valid && !s_in_ready) n_in_stall++;
    if (s_out_valid && !s_out_ready) n_out_stall++;
  end
  always @(posedge clk_sys) if (rst_sys_n && tile_done) begin
    n_done++;
    last_err = tile_error;
  end
  always @(negedge clk_sys) s_out_ready = ($urandom_range(0, 3) != 0);

  // Two tile slots, so that a second tile can be streamed in while the
  // first is still being computed.
  logic [WL-1:0] s [2][NWW + NXW];
  logic [WL-1:0] y [2][TM][TR][TC];

  task automatic make_tile(input int sl);
    foreach (s[sl][q]) s[sl][q] = WL'($urandom);
    for (int m = 0; m < TM; m++)
      for (int r = 0; r < TR; r++)
        for (int c = 0; c < TC; c++) begin
          logic [WL-1:0] acc;
          acc = '0;
          for (int n = 0; n < TN; n++)
            for (int i = 0; i < K; i++)
              for (int j = 0; j < K; j++)
                acc += WL'(s[sl][((m * TN + n) * K + i) * K + j] *
                           s[sl][NWW + (n * RI + r + i) * CI + c + j]);
          y[sl][m][r][c] = acc;
        end
  endtask

  // Flip bit 15 of the last word of output lane 3 once the tile has been
  // computed, as a timing error in the accumulation would.
  task automatic inject_fault();
    wait (acc_phase == PH_STORE);
    dut.u_conv.g_lane[3].u_obank.mem[BEATS - 1] ^= 16'h8000;
  endtask

  task automatic send_tile(input int sl);
    for (int q = 0; q < NWW + NXW; q++) begin
      @(negedge clk_sys);
      s_in_valid = 1; s_in_data = s[sl][q];
      @(posedge clk_sys);
      while (!s_in_ready) @(posedge clk_sys);
    end
    @(negedge clk_sys); s_in_valid = 0;
  endtask

  // Collect one tile's outputs; returns the number of wrong words.
  task automatic collect_tile(input int sl, output int wrong);
    wrong = 0;
    for (int b = 0; b < BEATS; b++) begin
      int mb, r, c;
      @(posedge clk_sys);
      while (!(s_out_valid && s_out_ready)) @(posedge clk_sys);
      mb = b / (TR * TC); r = (b / TC) % TR; c = b % TC;
      for (int u = 0; u < UM; u++)
        if (s_out_data[u*WL +: WL] != y[sl][mb*UM + u][r][c]) wrong++;
    end
  endtask

  // Send one tile and collect its outputs; returns the checksum verdict and
  // the number of output words that differ from the reference.
  task automatic run_tile(input bit fault, output bit err, output int wrong);
    int done0;
    compute_cnt = 0;
    done0 = n_done;
    fork
      send_tile(0);
      begin
        if (fault) inject_fault();
      end
      collect_tile(0, wrong);
    join
    wait (n_done == done0 + 1);
    err = last_err;
    bump(compute_cnt == COMPUTE_CYCLES, $sformatf("compute cycles %0d", compute_cnt));
  endtask

  // Two tiles back to back: the second one is offered while the first is
  // computing, so the input FIFOs fill and stall the sender.
  task automatic run_pair(output bit err0, output bit err1, output int wrong0, output int wrong1);
    int done0;
    compute_cnt = 0;
    done0 = n_done;
    fork
      begin send_tile(0); send_tile(1); end
      begin
        collect_tile(0, wrong0);
        wait (n_done == done0 + 1);
        err0 = last_err;
        collect_tile(1, wrong1);
      end
    join
    wait (n_done == done0 + 2);
    err1 = last_err;
    bump(compute_cnt == 2 * COMPUTE_CYCLES, $sformatf("pair compute cycles %0d", compute_cnt));
  endtask

  task automatic set_clock(input logic [15:0] f);
    freq = f;
    reprogram = 1;
    #20 reprogram = 0;
    wait (locked);
    n_reprogram++;
  endtask

  initial begin
    bit err;
    int wrong;
    s_in_valid = 0; s_in_data = '0; freq = F_OVER;
    #1 rst_sys_n = 0; rst_acc_n = 0;     // falling edge starts the reset
    wait (locked);
    #100 rst_sys_n = 1; rst_acc_n = 1;

    // tile A
    make_tile(0);
    run_tile(0, err, wrong);
    bump(!err && wrong == 0, "tile A clean");
    if (!err) n_match++;

    // tile B with a timing error, then recovery at the safe frequency
    make_tile(0);
    run_tile(1, err, wrong);
    bump(err, "tile B error detected");
    bump(wrong == 1, $sformatf("tile B one corrupted word (%0d)", wrong));
    if (err) begin
      n_mismatch++;
      set_clock(F_SAFE);
      run_tile(0, err, wrong);
      n_reexec++;
      bump(!err && wrong == 0, "tile B re-executed clean");
      if (!err) n_match++;
      set_clock(F_OVER);
    end

    // tiles C and D back to back
    make_tile(0);
    make_tile(1);
    begin
      bit err1;
      int wrong1;
      run_pair(err, err1, wrong, wrong1);
      bump(!err && wrong == 0, "tile C clean");
      bump(!err1 && wrong1 == 0, "tile D clean");
      if (!err) n_match++;
      if (!err1) n_match++;
    end

    $display("mechanisms: match=%0d mismatch=%0d reexec=%0d reprogram=%0d in_stall=%0d out_stall=%0d",
             n_match, n_mismatch, n_reexec, n_reprogram, n_in_stall, n_out_stall);
    bump(n_match > 0, "checksum match happened");
    bump(n_mismatch > 0, "checksum mismatch happened");
    bump(n_reexec > 0, "safe re-execution happened");
    bump(n_reprogram > 0, "clock reprogramming happened");
    bump(n_in_stall > 0, "input back-pressure happened");
    bump(n_out_stall > 0, "output back-pressure happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
