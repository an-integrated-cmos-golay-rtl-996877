// tb_golay_correction: random saved messages and error patterns; checks that
// the output register takes saved xor err one clock after load, holds when
// load is low, and that valid follows load by one clock.
module tb_golay_correction;
  import golay_pkg::*;

  logic     clk = 0, reset = 1, load = 0;
  message_t saved = '0, err = '0;
  message_t corrected;
  logic     valid;
  int       checks = 0, failures = 0;

  golay_correction dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    message_t exp_out;
    logic     exp_valid;
    repeat (2) @(posedge clk);
    reset <= 0;
    @(posedge clk);
    exp_out = '0;
    for (int c = 0; c < 400; c++) begin
      load  <= 1'($urandom);
      saved <= 12'($urandom);
      err   <= 12'($urandom);
      @(posedge clk);
      exp_valid = load;
      if (load) exp_out = saved ^ err;
      #1;
      checks += 2;
      if (valid != exp_valid) failures++;
      if (corrected != exp_out) begin
        failures++;
        $display("cycle %0d: corrected %h expected %h", c, corrected, exp_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
