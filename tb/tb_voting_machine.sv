// tb_voting_machine: end-to-end test of the 24-voter machine at its full
// size. It sets whole switch patterns and checks, for both YES and NO, the
// binary count, the two decimal digits and the segments of both display
// digits against values worked out here from the switch positions.
//
// Scenarios: every voter YES (24 / 00); eleven voters moved to NO (13 / 11);
// a session of 12 YES, 10 NO and 2 undecided; every voter NO; every voter
// undecided; a session in which voters change their minds one at a time
// (YES -> NO, then NO -> undecided); and random sessions. It counts how
// often each mechanism was exercised (undecided votes, a change of mind,
// the single add-six correction for counts 10..19, the double correction
// with tens increment for 20..24, a display of 00) and fails if one never
// happened. The machine is combinational; outputs are sampled one time step
// after each change.
module tb_voting_machine;
  import voting_pkg::*;

  vote_e              sw [N_VOTERS];
  logic [COUNT_W-1:0] yes_count, no_count;
  bcd2_t              yes_dec, no_dec;
  seg7_t              yes_seg_tens, yes_seg_units, no_seg_tens, no_seg_units;

  int checks = 0, failures = 0;
  int n_neutral = 0, n_change = 0, n_fix1 = 0, n_fix2 = 0, n_zero = 0;

  // Bit d of LIT[s] is set when decimal digit d lights segment s (a..g).
  localparam logic [9:0] LIT [7] = '{10'h3ED, 10'h39F, 10'h3FB, 10'h36D, 10'h145, 10'h371, 10'h37C};

  voting_machine dut (
    .sw(sw),
    .yes_count(yes_count), .no_count(no_count),
    .yes_dec(yes_dec), .no_dec(no_dec),
    .yes_seg_tens(yes_seg_tens), .yes_seg_units(yes_seg_units),
    .no_seg_tens(no_seg_tens), .no_seg_units(no_seg_units)
  );

  function automatic seg7_t expected_seg(int d);
    seg7_t s;
    for (int i = 0; i < 7; i++) s[i] = LIT[i][d];
    return s;
  endfunction

  task automatic check_display(string what, int n, logic [COUNT_W-1:0] cnt, bcd2_t dec,
                               seg7_t st, seg7_t su);
    checks++;
    if (int'(cnt) != n || int'(dec.tens) != n / 10 || int'(dec.units) != n % 10
        || st !== expected_seg(n / 10) || su !== expected_seg(n % 10)) begin
      failures++;
      $display("FAIL %s: expected %0d, count=%0d display=%0d%0d", what, n, cnt, dec.tens, dec.units);
    end
    if (n >= 10 && n < 20) n_fix1++;
    if (n >= 20) n_fix2++;
    if (n == 0) n_zero++;
  endtask

  // Apply the current switches and check both displays.
  task automatic settle_and_check();
    int ny = 0, nn = 0;
    foreach (sw[i]) begin
      if (sw[i] == VOTE_YES) ny++;
      else if (sw[i] == VOTE_NO) nn++;
    end
    if (ny + nn < N_VOTERS) n_neutral++;
    #1;
    check_display("YES", ny, yes_count, yes_dec, yes_seg_tens, yes_seg_units);
    check_display("NO",  nn, no_count,  no_dec,  no_seg_tens,  no_seg_units);
  endtask

  task automatic expect_totals(int ny, int nn);
    checks++;
    if (int'(yes_count) != ny || int'(no_count) != nn) begin
      failures++;
      $display("FAIL scenario: expected %0d YES / %0d NO, got %0d / %0d", ny, nn, yes_count, no_count);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Every voter YES.
    foreach (sw[i]) sw[i] = VOTE_YES;
    settle_and_check();
    expect_totals(24, 0);

    // Eleven voters switch to NO.
    for (int i = 0; i < 11; i++) begin
      sw[3 + 2 * i] = VOTE_NO;
      n_change++;
    end
    settle_and_check();
    expect_totals(13, 11);

    // A session with 12 YES, 10 NO and 2 undecided voters (switch numbers 1-based).
    foreach (sw[i]) sw[i] = VOTE_NEUTRAL;
    foreach (sw[i])
      if (i + 1 inside {1, 2, 5, 7, 10, 12, 15, 16, 17, 22, 23, 24}) sw[i] = VOTE_YES;
      else if (i + 1 inside {3, 4, 6, 8, 9, 11, 13, 18, 19, 20}) sw[i] = VOTE_NO;
    settle_and_check();
    expect_totals(12, 10);

    // Every voter NO, then every voter undecided.
    foreach (sw[i]) sw[i] = VOTE_NO;
    settle_and_check();
    expect_totals(0, 24);
    foreach (sw[i]) sw[i] = VOTE_NEUTRAL;
    settle_and_check();
    expect_totals(0, 0);

    // Voters change their minds one by one: all YES -> all NO -> all undecided.
    foreach (sw[i]) sw[i] = VOTE_YES;
    settle_and_check();
    for (int i = 0; i < N_VOTERS; i++) begin
      sw[i] = VOTE_NO;
      n_change++;
      settle_and_check();
      expect_totals(N_VOTERS - 1 - i, i + 1);
    end
    for (int i = N_VOTERS - 1; i >= 0; i--) begin
      sw[i] = VOTE_NEUTRAL;
      n_change++;
      settle_and_check();
    end

    // Random sessions.
    for (int r = 0; r < 5000; r++) begin
      foreach (sw[i]) sw[i] = vote_e'($urandom_range(0, 2));
      settle_and_check();
    end

    $display("mechanisms: undecided=%0d change=%0d add6_once=%0d add6_twice=%0d zero=%0d",
             n_neutral, n_change, n_fix1, n_fix2, n_zero);
    checks++;
    if (n_neutral == 0 || n_change == 0 || n_fix1 == 0 || n_fix2 == 0 || n_zero == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
