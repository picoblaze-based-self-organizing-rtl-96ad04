// tb_pico_solar_iris: the array reshaped to 4 rows x 7 layers (four
// external inputs, one per feature of a four-feature data set) running two
// trained first-layer neurons of a voting classifier.
//
//   neuron 7 (layer 1, row 3, select code 4): z = (n1/2)/2 + (n3/2)/2,
//            vote = z > 0x35
//   neuron 8 (layer 1, row 4, select code 5): z = max(0, n4 - n3/2),
//            vote = z > 0x4A
// where n1..n4 are the four feature inputs. For the feature vector
// 71 EE 76 6A the expected results are z7 = 39 (vote 1) and z8 = 2F
// (vote 0). Further random feature vectors are checked against a model.
// With four rows the host map moves: inputs at 2..5, programme reset read
// at 6, configuration write at 7; neuron outputs are still Gray coded
// (neuron k, 0-based, at gray(k+8): 15 for neuron 7, 14 for neuron 8).
module tb_pico_solar_iris;
  import solar_pkg::*;

  localparam int ROWS = 4, LAYERS = 7, NN = ROWS * LAYERS;
  localparam int A_RST = 6, A_CFG = 7, A_N7 = 15, A_N8 = 14;
  localparam byte_t THR7 = 8'h35, THR8 = 8'h4A;
  logic clk = 1'b0, rst = 1'b1;
  logic ws = 1'b0, rs = 1'b0;
  logic [5:0] address = '0;
  logic [31:0] wdata = '0, rdata;
  byte_t vote_out [NN];
  int checks = 0, failures = 0;
  int n_vote1 = 0, n_vote0 = 0, n_clamp = 0;

  always #5 clk = ~clk;

  pico_solar #(.ROWS(ROWS), .LAYERS(LAYERS)) dut (
    .clk(clk), .rst(rst), .write_strobe(ws), .read_strobe(rs), .address(address),
    .wdata(wdata), .rdata(rdata), .vote_out(vote_out)
  );

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

  task automatic cfg_write(input int code, input paddr_t a, input instr_t d);
    host_write(A_CFG, {3'b000, 5'(code), d, a});
    repeat (5) @(negedge clk);
  endtask

  // shared tail: output z (s0) to port 01, vote (z > sF) to port 02
  task automatic vote_tail(input int code, input paddr_t base);
    cfg_write(code, base + 0, i_output(4'h0, 8'h01));
    cfg_write(code, base + 1, i_alu_r(ALU_LOAD, 4'h2, 4'hF));
    cfg_write(code, base + 2, i_alu_r(ALU_SUB, 4'h2, 4'h0));
    cfg_write(code, base + 3, i_load_k(4'h3, 8'h00));
    cfg_write(code, base + 4, i_jump_c(COND_NC, base + 6));
    cfg_write(code, base + 5, i_load_k(4'h3, 8'h01));
    cfg_write(code, base + 6, i_output(4'h3, 8'h02));
    cfg_write(code, base + 7, i_jump(8'h01));
  endtask

  task automatic run_vector(input byte_t f [4]);
    logic [31:0] d;
    byte_t z7, z8;
    int    diff;
    for (int r = 0; r < 4; r++) host_write(2 + r, 32'(f[r]));
    repeat (120) @(negedge clk);
    z7 = 8'((f[0] >> 2) + (f[2] >> 2));
    diff = int'(f[3]) - int'(f[2] >> 1);
    z8 = (diff < 0) ? 8'h00 : 8'(diff);
    if (diff < 0) n_clamp++;
    host_read(A_N7, d);
    check(d == 32'(z7), $sformatf("features %h %h %h %h: neuron 7 = %h, expected %h", f[0], f[1], f[2], f[3], d, z7));
    host_read(A_N8, d);
    check(d == 32'(z8), $sformatf("features %h %h %h %h: neuron 8 = %h, expected %h", f[0], f[1], f[2], f[3], d, z8));
    check(vote_out[2] == 8'(z7 > THR7), $sformatf("neuron 7 vote %h for z %h", vote_out[2], z7));
    check(vote_out[3] == 8'(z8 > THR8), $sformatf("neuron 8 vote %h for z %h", vote_out[3], z8));
    if (vote_out[2] == 1 || vote_out[3] == 1) n_vote1++;
    if (vote_out[2] == 0 || vote_out[3] == 0) n_vote0++;
  endtask

  initial begin
    logic [31:0] d;
    byte_t f [4];
    repeat (3) @(negedge clk);
    rst = 1'b0;
    // neuron 7: quarter of n1 plus quarter of n3
    cfg_write(4, 8'h00, i_int_en(1'b0));
    cfg_write(4, 8'h01, i_input(4'h0, 8'h00));
    cfg_write(4, 8'h02, i_input(4'h1, 8'h02));
    cfg_write(4, 8'h03, i_load_k(4'hF, THR7));
    cfg_write(4, 8'h04, i_shift(4'h0, 1'b1, 3'd6));
    cfg_write(4, 8'h05, i_shift(4'h1, 1'b1, 3'd6));
    cfg_write(4, 8'h06, i_shift(4'h0, 1'b1, 3'd6));
    cfg_write(4, 8'h07, i_shift(4'h1, 1'b1, 3'd6));
    cfg_write(4, 8'h08, i_alu_r(ALU_ADD, 4'h0, 4'h1));
    vote_tail(4, 8'h09);
    // neuron 8: n4 minus half of n3, clamped at 0
    cfg_write(5, 8'h00, i_int_en(1'b0));
    cfg_write(5, 8'h01, i_input(4'h0, 8'h03));
    cfg_write(5, 8'h02, i_input(4'h1, 8'h02));
    cfg_write(5, 8'h03, i_load_k(4'hF, THR8));
    cfg_write(5, 8'h04, i_shift(4'h1, 1'b1, 3'd6));
    cfg_write(5, 8'h05, i_alu_r(ALU_SUB, 4'h0, 4'h1));
    cfg_write(5, 8'h06, i_jump_c(COND_NC, 8'h08));
    cfg_write(5, 8'h07, i_load_k(4'h0, 8'h00));
    vote_tail(5, 8'h08);
    host_read(A_RST, d);

    f = '{8'h71, 8'hEE, 8'h76, 8'h6A};
    run_vector(f);
    host_read(A_N7, d); check(d == 32'h39, "neuron 7 = 39 for 71 EE 76 6A");
    host_read(A_N8, d); check(d == 32'h2F, "neuron 8 = 2F for 71 EE 76 6A");
    check(vote_out[2] == 8'h01 && vote_out[3] == 8'h00, "votes 1 and 0 for 71 EE 76 6A");
    for (int t = 0; t < 30; t++) begin
      for (int r = 0; r < 4; r++) f[r] = 8'($urandom);
      run_vector(f);
    end
    checks += 3;
    if (n_vote1 == 0) begin failures++; $display("FAIL no vote of 1"); end
    if (n_vote0 == 0) begin failures++; $display("FAIL no vote of 0"); end
    if (n_clamp == 0) begin failures++; $display("FAIL clamp at 0 never exercised"); end
    $display("vectors with a 1 vote=%0d, with a 0 vote=%0d, clamped=%0d", n_vote1, n_vote0, n_clamp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
