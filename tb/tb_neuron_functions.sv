// tb_neuron_functions: basis functions as neuron programs.
//
// Loads one neuron, in turn, with programs for several of the basis
// functions a SOLAR neuron is built from, and checks each against a model
// over random inputs x = source 0, y = source 1:
//   ADD   z = (x + y) mod 256
//   SUB   z = max(0, x - y)
//   F1    z = x/2 + y/2            (each input halved, then added)
//   F2    z = max(0, x - y)        after "ident" and "half": max(0, x - y/2)
//   MULT  z = (x * y) / 256        8 x 8 shift-and-add multiply, high byte
//   SQRE  z = (x * x) / 256        the same multiply subroutine, x twice
// The multiply is a subroutine at address 20h reached with CALL, so this
// also runs CALL/RETURN, ADDCY and SLA inside a neuron. The scaling of MULT
// and SQRE (high byte of the product) is a choice of this test. Every
// program must fit in the 256-word program memory, and the longest one
// must deliver a result within two passes, 320 clocks.
module tb_neuron_functions;
  import solar_pkg::*;

  localparam int NIN = 30;
  typedef enum int {F_ADD, F_SUB, F_F1, F_F2, F_MULT, F_SQRE} func_e;

  logic   clk = 1'b0, rst = 1'b1;
  byte_t  data_in [NIN];
  byte_t  data_out, vote_out;
  logic   cfg_we = 1'b0;
  paddr_t cfg_addr = '0;
  instr_t cfg_data = '0;
  int checks = 0, failures = 0;
  int words = 0;

  always #5 clk = ~clk;

  solar_neuron #(.NIN(NIN)) dut (
    .clk(clk), .rst(rst), .data_in(data_in), .data_out(data_out), .vote_out(vote_out),
    .cfg_we(cfg_we), .cfg_addr(cfg_addr), .cfg_data(cfg_data)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic w(input paddr_t a, input instr_t d);
    @(negedge clk);
    cfg_we = 1'b1; cfg_addr = a; cfg_data = d;
    @(negedge clk);
    cfg_we = 1'b0;
    words++;
  endtask

  // 8 x 8 multiply: s0 * s1 -> s2:s3, clobbers s1 and s4
  task automatic load_mul8();
    w(8'h20, i_load_k(4'h2, 8'h00));
    w(8'h21, i_load_k(4'h3, 8'h00));
    w(8'h22, i_load_k(4'h4, 8'h08));
    w(8'h23, i_shift(4'h3, 1'b0, 3'd6));             // SL0 s3
    w(8'h24, i_shift(4'h2, 1'b0, 3'd0));             // SLA s2
    w(8'h25, i_shift(4'h1, 1'b0, 3'd6));             // SL0 s1 -> carry = next bit of y
    w(8'h26, i_jump_c(COND_NC, 8'h29));
    w(8'h27, i_alu_r(ALU_ADD, 4'h3, 4'h0));
    w(8'h28, i_alu_k(ALU_ADDC, 4'h2, 8'h00));
    w(8'h29, i_alu_k(ALU_SUB, 4'h4, 8'h01));
    w(8'h2A, i_jump_c(COND_NZ, 8'h23));
    w(8'h2B, i_return());
  endtask

  task automatic load_func(input func_e f);
    words = 0;
    w(8'h00, i_int_en(1'b0));
    w(8'h01, i_input(4'h0, 8'h00));
    w(8'h02, i_input(4'h1, 8'h01));
    case (f)
      F_ADD: begin
        w(8'h03, i_alu_r(ALU_ADD, 4'h0, 4'h1));
        w(8'h04, i_output(4'h0, 8'h01));
        w(8'h05, i_jump(8'h01));
      end
      F_SUB: begin
        w(8'h03, i_alu_r(ALU_SUB, 4'h0, 4'h1));
        w(8'h04, i_jump_c(COND_NC, 8'h06));
        w(8'h05, i_load_k(4'h0, 8'h00));
        w(8'h06, i_output(4'h0, 8'h01));
        w(8'h07, i_jump(8'h01));
      end
      F_F1: begin
        w(8'h03, i_shift(4'h0, 1'b1, 3'd6));
        w(8'h04, i_shift(4'h1, 1'b1, 3'd6));
        w(8'h05, i_alu_r(ALU_ADD, 4'h0, 4'h1));
        w(8'h06, i_output(4'h0, 8'h01));
        w(8'h07, i_jump(8'h01));
      end
      F_F2: begin
        w(8'h03, i_shift(4'h1, 1'b1, 3'd6));
        w(8'h04, i_alu_r(ALU_SUB, 4'h0, 4'h1));
        w(8'h05, i_jump_c(COND_NC, 8'h07));
        w(8'h06, i_load_k(4'h0, 8'h00));
        w(8'h07, i_output(4'h0, 8'h01));
        w(8'h08, i_jump(8'h01));
      end
      F_MULT: begin
        w(8'h03, i_call(8'h20));
        w(8'h04, i_output(4'h2, 8'h01));
        w(8'h05, i_jump(8'h01));
        load_mul8();
      end
      F_SQRE: begin
        w(8'h02, i_alu_r(ALU_LOAD, 4'h1, 4'h0));   // y := x
        w(8'h03, i_call(8'h20));
        w(8'h04, i_output(4'h2, 8'h01));
        w(8'h05, i_jump(8'h01));
        load_mul8();
      end
    endcase
  endtask

  function automatic byte_t model(input func_e f, input byte_t x, input byte_t y);
    case (f)
      F_ADD:  return 8'(x + y);
      F_SUB:  return (x > y) ? 8'(x - y) : 8'h00;
      F_F1:   return 8'((x >> 1) + (y >> 1));
      F_F2:   return (x > (y >> 1)) ? 8'(x - (y >> 1)) : 8'h00;
      F_MULT: return 8'((16'(x) * 16'(y)) >> 8);
      F_SQRE: return 8'((16'(x) * 16'(x)) >> 8);
      default: return 8'h00;
    endcase
  endfunction

  int latency;
  initial begin
    func_e f;
    foreach (data_in[i]) data_in[i] = 8'($urandom);
    for (int fi = 0; fi <= int'(F_SQRE); fi++) begin
      f = func_e'(fi);
      rst = 1'b1;
      load_func(f);
      check(words <= 256, $sformatf("%s fits: %0d words", f.name(), words));
      @(negedge clk); rst = 1'b0;
      for (int t = 0; t < 20; t++) begin
        byte_t x, y, z;
        x = 8'($urandom); y = 8'($urandom);
        if (t == 0) begin x = 8'hFF; y = 8'hFF; end
        if (t == 1) begin x = 8'h10; y = 8'h80; end
        data_in[0] = x; data_in[1] = y;
        z = model(f, x, y);
        // the result must appear within two passes of the program (a
        // multiply pass is about 72 instructions, 144 clocks)
        latency = 0;
        repeat (2) begin
          repeat (160) begin @(negedge clk); latency++; end
        end
        check(data_out == z, $sformatf("%s(%h, %h) = %h, expected %h", f.name(), x, y, data_out, z));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
