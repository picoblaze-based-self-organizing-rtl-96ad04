// tb_cfg_bus_ctrl: self-checking test of the configuration bus controller.
//
// For every select code 0..31 it writes one configuration word and checks,
// clock by clock, that address and data appear one clock after the write,
// that the write enable of the neuron the code selects (code k+2 ->
// neuron k) is high in exactly one clock, four clocks after the write, and
// that no other enable ever rises. Codes 0, 1, 30 and 31 must select none.
module tb_cfg_bus_ctrl;
  import solar_pkg::*;

  localparam int NN = 28;
  logic      clk = 1'b0;
  logic      rst = 1'b1;
  logic      wr = 1'b0;
  cfg_word_t wdata;
  paddr_t    cfg_addr;
  instr_t    cfg_data;
  logic [SEL_W-1:0] sel_code;
  logic [NN-1:0] cfg_en;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  cfg_bus_ctrl #(.NN(NN)) dut (
    .clk(clk), .rst(rst), .wr(wr), .wdata(wdata), .cfg_addr(cfg_addr),
    .cfg_data(cfg_data), .sel_code(sel_code), .cfg_en(cfg_en)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    wdata = '0;
    repeat (2) @(posedge clk);
    #1;
    check(cfg_en == '0 && sel_code == '1, "reset state");
    rst = 1'b0;
    for (int code = 0; code < 32; code++) begin
      logic [NN-1:0] exp_en;
      cfg_word_t w;
      w.sel = SEL_W'(code); w.data = 16'($urandom); w.addr = 8'($urandom);
      exp_en = '0;
      if (code >= 2 && code < NN + 2) exp_en[code - 2] = 1'b1;
      @(negedge clk);
      wr = 1'b1; wdata = w;
      @(negedge clk);
      wr = 1'b0; wdata = '0;
      // one clock after the write
      check(cfg_addr == w.addr && cfg_data == w.data, $sformatf("code %0d: bus fields", code));
      check(cfg_en == '0, $sformatf("code %0d: enable after 1 clock", code));
      @(negedge clk); check(cfg_en == '0, $sformatf("code %0d: enable after 2 clocks", code));
      @(negedge clk); check(cfg_en == '0 && sel_code == w.sel, $sformatf("code %0d: after 3 clocks", code));
      @(negedge clk); check(cfg_en == exp_en, $sformatf("code %0d: enable after 4 clocks = %h", code, cfg_en));
      @(negedge clk); check(cfg_en == '0, $sformatf("code %0d: enable after 5 clocks", code));
      check(cfg_addr == w.addr && cfg_data == w.data, $sformatf("code %0d: bus held", code));
    end
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
