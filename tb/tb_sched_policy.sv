// tb_sched_policy: exhaustive check of one scheduling policy unit against the
// Schedule() rules: ready contexts issue a read/write only with the lock and
// no pending activate/precharge elsewhere; blocked contexts issue an
// activate/precharge with the lock when their timers allow and no context
// hits the open row; the lock passes on unless used.
module tb_sched_policy;
  int checks = 0, failures = 0;
  logic valid, ready, blocked, can, hitp, actv, lock_in, irw, iap, lock_out;

  sched_policy u_dut (.valid, .ready, .blocked, .can_actpre(can), .bank_hit_predict(hitp),
                      .bank_actv(actv), .lock_in, .issue_rw(irw), .issue_actpre(iap), .lock_out);

  initial begin
    for (int v = 0; v < 128; v++) begin
      logic e_rw, e_ap;
      {valid, ready, blocked, can, hitp, actv, lock_in} = 7'(v);
      if (ready && blocked) continue;
      #1;
      e_rw = valid && ready && !actv && lock_in;
      e_ap = valid && blocked && !hitp && can && lock_in;
      checks++;
      if (irw != e_rw || iap != e_ap || lock_out != (lock_in && !e_rw && !e_ap)) begin
        failures++;
        $display("FAIL: inputs %b -> rw %b ap %b lock %b", 7'(v), irw, iap, lock_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
