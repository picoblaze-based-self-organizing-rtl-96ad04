// tb_input_mux: self-checking test of the registered N:1 input multiplexer.
//
// Drives random source values and random selects (in and out of range) and
// checks that `dout` shows din[sel] (or 0 for an unused select) exactly one
// clock later.
module tb_input_mux;
  import solar_pkg::*;

  localparam int N = 30;
  logic  clk = 1'b0;
  byte_t din [N];
  byte_t sel, dout;
  byte_t expect_q;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  input_mux #(.N(N)) dut (.clk(clk), .din(din), .sel(sel), .dout(dout));

  initial begin
    for (int i = 0; i < N; i++) din[i] = 8'($urandom);
    sel = '0;
    @(posedge clk);
    for (int t = 0; t < 500; t++) begin
      for (int i = 0; i < N; i++) din[i] = 8'($urandom);
      sel = (t % 5 == 0) ? 8'($urandom) : 8'($urandom_range(N - 1));
      expect_q = (sel < N) ? din[sel] : 8'h00;
      @(posedge clk); #1;
      checks++;
      if (dout !== expect_q) begin
        failures++;
        $display("FAIL sel %0d: got %h expected %h", sel, dout, expect_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
