// tb_dp_imem: self-checking test of the dual-port instruction memory.
//
// Checks the power-up program, one-clock read latency, writes through the
// configuration port at random addresses against a reference array,
// read-first behaviour when both ports hit the same word, and that
// reading continues undisturbed while other words are written.
module tb_dp_imem;
  import solar_pkg::*;

  logic        clk = 1'b0;
  logic [7:0]  raddr, waddr;
  logic [15:0] rdata, wdata;
  logic        we;
  logic [15:0] ref_mem [256];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  dp_imem dut (.clk(clk), .raddr(raddr), .rdata(rdata), .we(we), .waddr(waddr), .wdata(wdata));

  task automatic check(input logic [15:0] got, input logic [15:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    we = 1'b0; raddr = '0; waddr = '0; wdata = '0;
    // power-up contents: INPUT s0,00 / INPUT s1,01 / ADD s0,s1 / OUTPUT s0,00 / JUMP 00
    ref_mem = '{default: 16'h0000};
    ref_mem[0] = 16'hA000; ref_mem[1] = 16'hA101; ref_mem[2] = 16'hC014;
    ref_mem[3] = 16'hE000; ref_mem[4] = 16'h8100;
    for (int a = 0; a < 8; a++) begin
      raddr <= 8'(a);
      @(posedge clk); #1;
      check(rdata, ref_mem[a], "boot word");
    end
    // random writes, each read back later
    for (int i = 0; i < 200; i++) begin
      logic [7:0] a; logic [15:0] d;
      a = 8'($urandom); d = 16'($urandom);
      we <= 1'b1; waddr <= a; wdata <= d; raddr <= 8'(a + 1);
      @(posedge clk); #1;
      check(rdata, ref_mem[8'(a + 1)], "read while writing another word");
      ref_mem[a] = d;
    end
    we <= 1'b0;
    for (int a = 0; a < 256; a++) begin
      raddr <= 8'(a);
      @(posedge clk); #1;
      check(rdata, ref_mem[a], "read back");
    end
    // same word on both ports: old value first, new value next clock
    raddr <= 8'h33; we <= 1'b1; waddr <= 8'h33; wdata <= ~ref_mem[8'h33];
    @(posedge clk); #1;
    check(rdata, ref_mem[8'h33], "read-first collision");
    we <= 1'b0;
    @(posedge clk); #1;
    check(rdata, ~ref_mem[8'h33], "after collision");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
