// tb_regfile_sizes: the register side at the register-file sizes of the
// size sweep (50, 60, 70 and 80 physical registers, with the ROB, RVQ, LVQ
// and BOQ at their defaults). Each size runs its own random program through
// its own instance of the end-to-end driver; all four run side by side. The
// test passes when every instance finishes its program with all checks
// correct and every mechanism seen. Commits per cycle are printed for each
// size; they are not compared, as the programs differ and the timing of
// the outside models is random.
module tb_regfile_sizes;
  localparam int NSIZES = 4;
  localparam int SIZES [NSIZES] = '{50, 60, 70, 80};

  bit done [NSIZES];
  int checks_i [NSIZES], failures_i [NSIZES], cycles_i [NSIZES], commits_i [NSIZES];

  for (genvar g = 0; g < NSIZES; g++) begin : g_size
    rmt_e2e_bench #(.NP(SIZES[g]), .NPROG(6000)) u_bench (
      .done(done[g]), .checks(checks_i[g]), .failures(failures_i[g]),
      .cycles(cycles_i[g]), .commits(commits_i[g])
    );
  end

  function automatic bit all_done();
    foreach (done[i]) if (!done[i]) return 0;
    return 1;
  endfunction

  task automatic report(input int extra_failures);
    int checks = 0, failures = extra_failures;
    foreach (done[i]) begin
      checks += checks_i[i];
      failures += failures_i[i];
      $display("NUM_PREGS=%0d commits=%0d cycles=%0d commits_per_cycle=%0.3f",
               SIZES[i], commits_i[i], cycles_i[i],
               (cycles_i[i] > 0) ? real'(commits_i[i]) / cycles_i[i] : 0.0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  endtask

  initial begin
    #1;
    while (!all_done()) #100;
    report(0);
    $finish;
  end

  initial begin
    #3_000_000;
    $display("watchdog expired");
    report(1);
    $finish;
  end
endmodule
