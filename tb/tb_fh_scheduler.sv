// tb_fh_scheduler: exhaustive check of the task-switch decision against a
// reference written independently (highest non-empty queue, strict
// preemption, switch when the executing task stopped).
`timescale 1ns/1ps
module tb_fh_scheduler;
  logic [7:0] nonempty;
  logic       run_active, allowed, any_ready, do_switch;
  logic [2:0] run_prio, best_prio;
  int checks = 0, failures = 0;

  fh_scheduler #(.NPRIO(8)) dut (.nonempty, .run_active, .run_prio, .allowed,
                                 .any_ready, .best_prio, .do_switch);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ne = 0; ne < 256; ne++)
      for (int ra = 0; ra < 2; ra++)
        for (int rp = 0; rp < 8; rp++)
          for (int al = 0; al < 2; al++) begin
            int best;
            bit exp_sw;
            nonempty = 8'(ne); run_active = ra[0]; run_prio = 3'(rp); allowed = al[0];
            #1;
            best = 0;
            while (best < 8 && !ne[best]) best++;
            exp_sw = al[0] && ne != 0 && (!ra[0] || best < rp);
            checks++;
            if (any_ready != (ne != 0)) failures++;
            if (ne != 0) begin
              checks++;
              if (best_prio != 3'(best)) begin
                failures++;
                $display("ne=%b best=%0d got %0d", ne[7:0], best, best_prio);
              end
            end
            checks++;
            if (do_switch != exp_sw) begin
              failures++;
              $display("ne=%b ra=%0d rp=%0d al=%0d: do_switch=%0b", ne[7:0], ra, rp, al, do_switch);
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
