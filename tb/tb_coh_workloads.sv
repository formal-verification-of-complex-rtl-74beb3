// tb_coh_workloads: runs the random multiprocessor test on systems of 2, 3,
// 4 and 25 processors at once. The first three are the system sizes of the
// explicit-state verification runs the protocol was checked with; 25 is the
// number of processors an explicit model would need to show every
// combination of cache states that the symbolic analysis found. Each size
// must pass all of its checks, and every protocol mechanism must have
// occurred in the run of 3 or of 4 processors. With 25 processors most
// requests meet a locked entry and are retried, so that run is kept short
// and only reports which mechanisms it reached.
module tb_coh_workloads;
  logic done2, done3, done4, done25;
  int   ch2, ch3, ch4, ch25, f2, f3, f4, f25;
  logic all2, all3, all4, all25;

  coh_sys_run #(.NP(2),  .NOPS(8000)) u_n2  (.done(done2),  .checks(ch2),  .failures(f2),  .all_seen(all2));
  coh_sys_run #(.NP(3),  .NOPS(8000)) u_n3  (.done(done3),  .checks(ch3),  .failures(f3),  .all_seen(all3));
  coh_sys_run #(.NP(4),  .NOPS(8000)) u_n4  (.done(done4),  .checks(ch4),  .failures(f4),  .all_seen(all4));
  coh_sys_run #(.NP(25), .NOPS(1000)) u_n25 (.done(done25), .checks(ch25), .failures(f25), .all_seen(all25));

  int checks, failures;

  initial begin
    #50ms;
    $display("watchdog expired: done %0d %0d %0d %0d", done2, done3, done4, done25);
    $display("TB_RESULT checks=%0d failures=%0d", ch2 + ch3 + ch4 + ch25, f2 + f3 + f4 + f25 + 1);
    $finish;
  end

  initial begin
    wait (done2 && done3 && done4 && done25);
    checks   = ch2 + ch3 + ch4 + ch25 + 1;
    failures = f2 + f3 + f4 + f25;
    if (!(all3 || all4)) begin
      failures++;
      $display("FAIL some mechanism never occurred with 3 or 4 processors");
    end
    $display("all mechanisms seen: n2=%0d n3=%0d n4=%0d n25=%0d", all2, all3, all4, all25);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
