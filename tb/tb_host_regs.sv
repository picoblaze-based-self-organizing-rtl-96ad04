// tb_host_regs: self-checking test of the host register decoder.
//
// Writes the external input registers and checks them on the outputs and
// by readback; reads every neuron output register at its Gray-coded
// address (the expected addresses are typed in as a table, independent of
// the formula in the design); checks that the configuration write and the
// programme-reset read raise their strobes only at their own addresses,
// and that reads of unused addresses and idle cycles return 0.
module tb_host_regs;
  import solar_pkg::*;

  localparam int ROWS = 2, LAYERS = 14, NN = ROWS * LAYERS;
  logic clk = 1'b0, rst = 1'b1;
  logic ws = 1'b0, rs = 1'b0;
  logic [5:0] address = '0;
  logic [31:0] wdata = '0, rdata;
  byte_t in_regs [ROWS];
  byte_t nn_regs [NN];
  logic cfg_wr, prog_rst;
  cfg_word_t cfg_word;
  int checks = 0, failures = 0;

  // Readback address of neuron (layer, row), row-pairs (1,1),(1,2),(2,1)...
  int unsigned rd_map [NN] = '{12, 13, 15, 14, 10, 11, 9, 8, 24, 25, 27, 26, 30, 31,
                               29, 28, 20, 21, 23, 22, 18, 19, 17, 16, 48, 49, 51, 50};

  always #5 clk = ~clk;

  host_regs #(.ROWS(ROWS), .LAYERS(LAYERS)) dut (
    .clk(clk), .rst(rst), .write_strobe(ws), .read_strobe(rs), .address(address),
    .wdata(wdata), .rdata(rdata), .in_regs(in_regs), .nn_regs(nn_regs),
    .cfg_wr(cfg_wr), .cfg_word(cfg_word), .prog_rst(prog_rst)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  int unsigned cfg_count = 0, rst_count = 0;
  always @(posedge clk) begin
    if (cfg_wr) cfg_count++;
    if (prog_rst) rst_count++;
  end

  initial begin
    for (int k = 0; k < NN; k++) nn_regs[k] = 8'(8'h40 + k);
    @(negedge clk);
    check(in_regs[0] == 0 && in_regs[1] == 0, "reset values");
    rst = 1'b0;
    // write external inputs
    @(negedge clk); ws = 1'b1; address = 6'd2; wdata = 32'hFFFF_FF06;
    @(negedge clk); address = 6'd3; wdata = 32'h0000_0002;
    @(negedge clk); ws = 1'b0;
    check(in_regs[0] == 8'h06 && in_regs[1] == 8'h02, "input registers");
    rs = 1'b1; address = 6'd2; #1; check(rdata == 32'h06, "read input 1");
    address = 6'd3; #1; check(rdata == 32'h02, "read input 2");
    // neuron readback
    for (int k = 0; k < NN; k++) begin
      address = 6'(rd_map[k]); #1;
      check(rdata == 32'(8'h40 + k), $sformatf("read neuron %0d at %0d: %h", k, rd_map[k], rdata));
    end
    // unused addresses read 0
    foreach (rd_map[k]) nn_regs[k] = 8'hFF;
    for (int a = 32; a < 48; a++) begin
      address = 6'(a); #1; check(rdata == 0, $sformatf("unused address %0d", a));
    end
    rs = 1'b0; address = 6'd12; #1; check(rdata == 0, "idle bus reads 0");
    // strobes
    @(negedge clk);
    for (int a = 0; a < 64; a++) begin
      ws = 1'b1; rs = 1'b0; address = 6'(a); wdata = 32'h1F12_3456; #1;
      check(cfg_wr == (a == 5) && !prog_rst, $sformatf("write strobe decode at %0d", a));
      if (a == 5) check(cfg_word == 29'h1F12_3456, "config word passes");
      ws = 1'b0; rs = 1'b1; #1;
      check(prog_rst == (a == 4) && !cfg_wr, $sformatf("read strobe decode at %0d", a));
      rs = 1'b0;
    end
    @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
