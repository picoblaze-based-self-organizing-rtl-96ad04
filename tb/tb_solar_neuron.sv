// tb_solar_neuron: self-checking test of one neuron.
//
// 1. After reset the neuron runs its start-up program: data_out must become
//    source 0 + source 1.
// 2. A "difference and vote" program is written through the configuration
//    port: z = max(0, x - y/2) from two selectable sources, output to port
//    01, and a vote (z > threshold) to port 02. The connections (source
//    ports) and the threshold are single words of the program. For random
//    sources, ports and thresholds the outputs are compared with a model.
// 3. Without reset, one connection word is rewritten while the program
//    runs, and the outputs must follow the new connection.
module tb_solar_neuron;
  import solar_pkg::*;

  localparam int NIN = 30;
  logic   clk = 1'b0, rst = 1'b1;
  byte_t  data_in [NIN];
  byte_t  data_out, vote_out;
  logic   cfg_we = 1'b0;
  paddr_t cfg_addr = '0;
  instr_t cfg_data = '0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  solar_neuron #(.NIN(NIN)) dut (
    .clk(clk), .rst(rst), .data_in(data_in), .data_out(data_out), .vote_out(vote_out),
    .cfg_we(cfg_we), .cfg_addr(cfg_addr), .cfg_data(cfg_data)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic write_word(input paddr_t a, input instr_t d);
    @(negedge clk);
    cfg_we = 1'b1; cfg_addr = a; cfg_data = d;
    @(negedge clk);
    cfg_we = 1'b0;
  endtask

  task automatic load_program(input byte_t px, input byte_t py, input byte_t thr);
    write_word(8'h00, i_int_en(1'b0));
    write_word(8'h01, i_input(4'h0, px));
    write_word(8'h02, i_input(4'h1, py));
    write_word(8'h03, i_load_k(4'hF, thr));
    write_word(8'h04, i_shift(4'h1, 1'b1, 3'd6));      // SR0 s1
    write_word(8'h05, i_alu_r(ALU_SUB, 4'h0, 4'h1));
    write_word(8'h06, i_jump_c(COND_NC, 8'h08));
    write_word(8'h07, i_load_k(4'h0, 8'h00));
    write_word(8'h08, i_output(4'h0, 8'h01));
    write_word(8'h09, i_alu_r(ALU_LOAD, 4'h2, 4'hF));
    write_word(8'h0A, i_alu_r(ALU_SUB, 4'h2, 4'h0));   // carry when z > thr
    write_word(8'h0B, i_load_k(4'h3, 8'h00));
    write_word(8'h0C, i_jump_c(COND_NC, 8'h0E));
    write_word(8'h0D, i_load_k(4'h3, 8'h01));
    write_word(8'h0E, i_output(4'h3, 8'h02));
    write_word(8'h0F, i_jump(8'h01));
  endtask

  function automatic byte_t model_z(input byte_t x, input byte_t y);
    int d;
    d = int'(x) - int'(y >> 1);
    return (d < 0) ? 8'h00 : 8'(d);
  endfunction

  initial begin
    byte_t px, py, thr, z;
    foreach (data_in[i]) data_in[i] = 8'($urandom);
    repeat (3) @(negedge clk);
    rst = 1'b0;
    repeat (40) @(negedge clk);
    check(data_out == 8'(data_in[0] + data_in[1]), $sformatf("start-up program: %h", data_out));
    check(vote_out == 8'h00, "no vote from start-up program");

    for (int t = 0; t < 12; t++) begin
      px = 8'($urandom_range(NIN - 1)); py = 8'($urandom_range(NIN - 1));
      thr = 8'($urandom);
      rst = 1'b1;
      load_program(px, py, thr);
      foreach (data_in[i]) data_in[i] = 8'($urandom);
      @(negedge clk); rst = 1'b0;
      repeat (80) @(negedge clk);
      z = model_z(data_in[px], data_in[py]);
      check(data_out == z, $sformatf("z ports %0d,%0d: got %h expected %h", px, py, data_out, z));
      check(vote_out == 8'(z > thr), $sformatf("vote z=%h thr=%h: got %h", z, thr, vote_out));
      // change the first connection at run time, no reset
      px = 8'($urandom_range(NIN - 1));
      write_word(8'h01, i_input(4'h0, px));
      repeat (80) @(negedge clk);
      z = model_z(data_in[px], data_in[py]);
      check(data_out == z, $sformatf("reconfigured port %0d: got %h expected %h", px, data_out, z));
      check(vote_out == 8'(z > thr), "vote after reconfiguration");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
