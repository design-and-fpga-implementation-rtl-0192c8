// tb_ld_step_gen -- HALF_PERIOD = 5: after reset the reference is 2.0; with
// the enable held high and dropped now and then, the level must change
// after every 5 enabled samples, with toggle_o high exactly on those edges.
module tb_ld_step_gen;
  import ld_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0;
  y_t   step;
  logic high, tog;

  ld_step_gen #(.HALF_PERIOD(5)) dut (.clk_i(clk), .rst_ni(rst_n), .en_i(en),
                                      .step_o(step), .high_o(high), .toggle_o(tog));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n = 0;          // enabled samples seen
    logic exp_high;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 80; k++) begin
      @(negedge clk);
      en = (k % 7 != 3);
      #1;
      exp_high = ((n / 5) % 2) == 0;
      checks++;
      if (high !== exp_high || step !== (exp_high ? y_t'(131072) : y_t'(0)) ||
          tog !== (en && (n % 5 == 4))) begin
        failures++;
        $display("FAIL k=%0d n=%0d high=%0d step=%0d toggle=%0d", k, n, high, step, tog);
      end
      if (en) n++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
