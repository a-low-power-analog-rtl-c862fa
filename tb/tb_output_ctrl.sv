// Testbench of the output controller: arg-max over ten signed scores,
// random and with ties (lowest index wins) and all-negative scores.
module tb_output_ctrl;
  import pim_pkg::*;
  acc_t scores [10];
  logic [3:0] class_idx;
  acc_t class_score;
  int checks = 0, failures = 0;

  output_ctrl dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      int best;
      for (int j = 0; j < 10; j++) begin
        case (n % 3)
          0: scores[j] = acc_t'($urandom_range(0, 2000));
          1: scores[j] = acc_t'(int'($urandom_range(0, 8)) - 10);   // negative, ties
          default: scores[j] = acc_t'(int'($urandom_range(0, 4)));  // many ties
        endcase
      end
      best = 0;
      for (int j = 1; j < 10; j++) if (scores[j] > scores[best]) best = j;
      #1;
      checks++;
      if (int'(class_idx) != best || class_score != scores[best]) begin
        failures++;
        $display("FAIL case %0d: class %0d expected %0d", n, class_idx, best);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
