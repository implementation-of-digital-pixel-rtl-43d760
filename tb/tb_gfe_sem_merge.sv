// tb_gfe_sem_merge: random gradients, directions and thresholds, including
// gradients equal to the threshold; checks each significant-edge bit and the
// merged bit.
module tb_gfe_sem_merge;
  import dps_pkg::*;
  localparam int N = 3;

  lfe_res_t res [N][OUT_SIDE];
  mag_t edge_th;
  logic sem [NDIR][N][OUT_SIDE];
  logic msem [N][OUT_SIDE];
  int checks = 0, failures = 0;

  gfe_sem_merge #(.NLFE(N)) dut (.*);

  initial begin
    for (int n = 0; n < 300; n++) begin
      edge_th = mag_t'($urandom_range(1000));
      for (int g = 0; g < N; g++)
        for (int q = 0; q < OUT_SIDE; q++) begin
          automatic int sel = int'($urandom_range(3));
          res[g][q].grad = (sel == 0) ? edge_th : (sel == 1) ? edge_th + 1 : mag_t'($urandom_range(1200));
          res[g][q].dir  = dir_e'($urandom_range(3));
        end
      #1;
      for (int g = 0; g < N; g++)
        for (int q = 0; q < OUT_SIDE; q++) begin
          automatic bit sig = int'(res[g][q].grad) > int'(edge_th);
          for (int d = 0; d < NDIR; d++) begin
            checks++;
            if (sem[d][g][q] != (sig && int'(res[g][q].dir) == d)) begin
              failures++; $display("FAIL sem d=%0d", d);
            end
          end
          checks++;
          if (msem[g][q] != sig) begin failures++; $display("FAIL msem"); end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
