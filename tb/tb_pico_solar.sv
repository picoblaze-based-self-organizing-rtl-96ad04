// tb_pico_solar: end-to-end test of the 2 x 14 neuron array at its default
// size, driven only through the host register bus.
//
// The test repeats the partial-reconfiguration experiment:
//   * six neurons get an "add two sources" program: n1 = in1+in2,
//     n2 = in1+in2, n3 = in2+n1, n4 = n1+n2, n5 = n2+n4, n6 = n3+n4;
//     the other 22 neurons keep the start-up program (in1+in2);
//   * a programme reset restarts all neurons, the inputs are set to 6 and 2
//     and all 28 outputs are read back at their Gray-coded addresses:
//     n1..n6 = 08 08 0A 10 18 1A, the rest 08;
//   * while the array runs, neuron 3 is rewired to n1+n2 and neuron 5 to
//     n3+n4 by rewriting one word each (select codes 4 and 6, no reset):
//     the outputs become 08 08 10 10 20 20, and the outputs of neurons 1,
//     2 and 4 must not move at any clock during the rewrite;
//   * neuron 7 gets a threshold program and its vote output is checked
//     for a threshold below and above its result;
//   * configuration writes with select codes that address no neuron must
//     leave every output unchanged;
//   * neuron 8 is given a program that computes once and halts: it must
//     ignore a new input value until a programme reset restarts it.
// Every mechanism exercised (configuration write, per-neuron enable,
// programme reset, run-time rewiring, readback, input write, vote, unused
// select code) is counted; one that never happened is a failure.
module tb_pico_solar;
  import solar_pkg::*;

  localparam int ROWS = 2, LAYERS = 14, NN = ROWS * LAYERS;
  logic clk = 1'b0, rst = 1'b1;
  logic ws = 1'b0, rs = 1'b0;
  logic [5:0] address = '0;
  logic [31:0] wdata = '0, rdata;
  byte_t vote_out [NN];
  int checks = 0, failures = 0;

  // readback addresses of neurons 1..28, typed in from the register map
  int unsigned rd_map [NN] = '{12, 13, 15, 14, 10, 11, 9, 8, 24, 25, 27, 26, 30, 31,
                               29, 28, 20, 21, 23, 22, 18, 19, 17, 16, 48, 49, 51, 50};

  // mechanism counters
  int n_cfg = 0, n_en = 0, n_prog_rst = 0, n_rewire = 0, n_read = 0, n_in = 0,
      n_vote = 0, n_nosel = 0, n_restart = 0;

  always #5 clk = ~clk;

  pico_solar dut (
    .clk(clk), .rst(rst), .write_strobe(ws), .read_strobe(rs), .address(address),
    .wdata(wdata), .rdata(rdata), .vote_out(vote_out)
  );

  always @(posedge clk) if (dut.cfg_en != '0) n_en++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic host_write(input int a, input logic [31:0] d);
    @(negedge clk);
    ws = 1'b1; address = 6'(a); wdata = d;
    @(negedge clk);
    ws = 1'b0;
  endtask

  task automatic host_read(input int a, output logic [31:0] d);
    @(negedge clk);
    rs = 1'b1; address = 6'(a);
    #1 d = rdata;
    @(negedge clk);
    rs = 1'b0;
  endtask

  // neuron number n (1-based) -> its source port on every multiplexer
  function automatic byte_t nport(input int n);
    return 8'(ROWS + n - 1);
  endfunction

  // one program word of neuron n: select code n+1 (code k+2 for index k)
  task automatic cfg_write(input int n, input paddr_t a, input instr_t d);
    host_write(5, {3'b000, 5'(n + 1), d, a});
    n_cfg++;
    repeat (5) @(negedge clk);
  endtask

  task automatic load_add(input int n, input byte_t pa, input byte_t pb);
    cfg_write(n, 8'h00, i_int_en(1'b0));
    cfg_write(n, 8'h01, i_input(4'h0, pa));
    cfg_write(n, 8'h02, i_input(4'h1, pb));
    cfg_write(n, 8'h03, i_alu_r(ALU_ADD, 4'h0, 4'h1));
    cfg_write(n, 8'h04, i_output(4'h0, 8'h01));
    cfg_write(n, 8'h05, i_jump(8'h01));
  endtask

  task automatic check_outputs(input byte_t exp [6], input string phase);
    logic [31:0] d;
    for (int n = 1; n <= NN; n++) begin
      host_read(int'(rd_map[n - 1]), d);
      n_read++;
      check(d == 32'((n <= 6) ? exp[n - 1] : 8'h08),
            $sformatf("%s: neuron %0d reads %h", phase, n, d));
    end
  endtask

  byte_t stable_ref [3];
  bit    watch_stable = 1'b0;
  always @(posedge clk) if (watch_stable) begin
    if (dut.nn_regs[0] != stable_ref[0] || dut.nn_regs[1] != stable_ref[1] ||
        dut.nn_regs[3] != stable_ref[2]) begin
      failures++;
      $display("FAIL neurons 1, 2, 4 disturbed during rewiring");
      watch_stable = 1'b0;
    end
  end

  initial begin
    logic [31:0] d;
    byte_t exp_init [6] = '{8'h08, 8'h08, 8'h0A, 8'h10, 8'h18, 8'h1A};
    byte_t exp_upd  [6] = '{8'h08, 8'h08, 8'h10, 8'h10, 8'h20, 8'h20};
    repeat (3) @(negedge clk);
    rst = 1'b0;

    // ---- initial network
    load_add(1, 8'd0, 8'd1);
    load_add(2, 8'd0, 8'd1);
    load_add(3, 8'd1, nport(1));
    load_add(4, nport(1), nport(2));
    load_add(5, nport(2), nport(4));
    load_add(6, nport(3), nport(4));
    host_read(4, d); n_prog_rst++;
    host_write(2, 32'd6); n_in++;
    host_write(3, 32'd2); n_in++;
    host_read(2, d); check(d == 6, "input 1 readback"); n_read++;
    host_read(3, d); check(d == 2, "input 2 readback"); n_read++;
    repeat (200) @(negedge clk);
    check_outputs(exp_init, "initial");

    // ---- rewire neurons 3 and 5 while running
    stable_ref[0] = dut.nn_regs[0]; stable_ref[1] = dut.nn_regs[1]; stable_ref[2] = dut.nn_regs[3];
    watch_stable = 1'b1;
    checks++;
    cfg_write(3, 8'h01, i_input(4'h0, nport(1)));
    cfg_write(3, 8'h02, i_input(4'h1, nport(2)));
    n_rewire++;
    cfg_write(5, 8'h01, i_input(4'h0, nport(3)));
    cfg_write(5, 8'h02, i_input(4'h1, nport(4)));
    n_rewire++;
    repeat (200) @(negedge clk);
    watch_stable = 1'b0;
    check_outputs(exp_upd, "updated");

    // ---- select codes that address no neuron change nothing
    host_write(5, {3'b000, 5'd0, i_load_k(4'h0, 8'h55), 8'h03}); n_nosel++;
    repeat (5) @(negedge clk);
    host_write(5, {3'b000, 5'd31, i_load_k(4'h0, 8'h55), 8'h03}); n_nosel++;
    repeat (100) @(negedge clk);
    check_outputs(exp_upd, "after unused codes");

    // ---- vote of neuron 7: its sum 08 against a threshold
    for (int t = 0; t < 2; t++) begin
      byte_t thr;
      thr = (t == 0) ? 8'h05 : 8'h20;
      cfg_write(7, 8'h04, i_load_k(4'hF, thr));
      cfg_write(7, 8'h05, i_alu_r(ALU_SUB, 4'hF, 4'h0));   // carry when sum > thr
      cfg_write(7, 8'h06, i_load_k(4'h3, 8'h00));
      cfg_write(7, 8'h07, i_jump_c(COND_NC, 8'h09));
      cfg_write(7, 8'h08, i_load_k(4'h3, 8'h01));
      cfg_write(7, 8'h09, i_output(4'h3, 8'h02));
      cfg_write(7, 8'h0A, i_jump(8'h00));
      cfg_write(7, 8'h03, i_output(4'h0, 8'h01));
      host_read(4, d); n_prog_rst++;
      repeat (200) @(negedge clk);
      check(vote_out[6] == ((t == 0) ? 8'h01 : 8'h00), $sformatf("vote %0d: %h", t, vote_out[6]));
      if (vote_out[6] == 8'h01) n_vote++;
      check(vote_out[0] == 8'h00, "no vote from add neurons");
      check_outputs(exp_upd, "after vote program");
    end

    // ---- programme reset: neuron 8 computes once and halts; it sees a new
    // input only after the programme reset restarts it
    cfg_write(8, 8'h04, i_jump(8'h04));
    host_read(4, d); n_prog_rst++;
    repeat (100) @(negedge clk);
    host_read(int'(rd_map[7]), d);
    check(d == 32'h08, $sformatf("halted neuron 8 reads %h", d));
    host_write(2, 32'd7); n_in++;
    repeat (100) @(negedge clk);
    host_read(int'(rd_map[7]), d);
    check(d == 32'h08, $sformatf("halted neuron 8 must not follow the input: %h", d));
    host_read(4, d); n_prog_rst++;
    repeat (100) @(negedge clk);
    host_read(int'(rd_map[7]), d);
    check(d == 32'h09, $sformatf("neuron 8 after programme reset reads %h", d));
    if (d == 32'h09) n_restart++;

    // ---- every mechanism happened
    checks += 9;
    if (n_cfg == 0)      begin failures++; $display("FAIL no configuration write"); end
    if (n_en != n_cfg)   begin failures++; $display("FAIL %0d enables for %0d writes", n_en, n_cfg); end
    if (n_restart == 0)  begin failures++; $display("FAIL programme reset never restarted a neuron"); end
    if (n_prog_rst == 0) begin failures++; $display("FAIL no programme reset"); end
    if (n_rewire == 0)   begin failures++; $display("FAIL no rewiring"); end
    if (n_read == 0)     begin failures++; $display("FAIL no readback"); end
    if (n_in == 0)       begin failures++; $display("FAIL no input write"); end
    if (n_vote == 0)     begin failures++; $display("FAIL no vote"); end
    if (n_nosel == 0)    begin failures++; $display("FAIL no unused select code"); end
    $display("mechanisms: cfg=%0d enables=%0d prog_rst=%0d restarts=%0d rewire=%0d reads=%0d inputs=%0d votes=%0d unused_sel=%0d",
             n_cfg, n_en, n_prog_rst, n_restart, n_rewire, n_read, n_in, n_vote, n_nosel);
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
