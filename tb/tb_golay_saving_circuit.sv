// tb_golay_saving_circuit: drives a random bit stream into the saving
// circuit and checks the one-clock synchronising delay, the contents of the
// 23-bit delay line (last 23 shifted bits, newest at bit 0) and the 12-bit
// message tap, including cycles with shift held low.
module tb_golay_saving_circuit;
  import golay_pkg::*;

  logic     clk = 0, reset = 1, din = 0, shift = 0;
  logic     din_sync;
  word_t    word;
  message_t message;
  int       checks = 0, failures = 0;

  golay_saving_circuit dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic  prev_din;
    word_t model;
    repeat (2) @(posedge clk);
    reset <= 0;
    model = '0;
    prev_din = 0;
    for (int c = 0; c < 500; c++) begin
      din   <= 1'($urandom);
      shift <= (($urandom % 5) != 0);
      @(posedge clk);
      // register model: line shifts in the previous synchronised bit
      if (shift) model = {model[21:0], prev_din};
      prev_din = din;
      #1;
      checks += 3;
      if (din_sync != prev_din) begin
        failures++;
        $display("cycle %0d: din_sync %b expected %b", c, din_sync, prev_din);
      end
      if (word != model) begin
        failures++;
        $display("cycle %0d: word %h expected %h", c, word, model);
      end
      if (message != model[22:11]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
