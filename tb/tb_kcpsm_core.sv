// tb_kcpsm_core: self-checking test of the KCPSM controller.
//
// A behavioural synchronous-read program memory holds a short program that
// exercises constant and register ALU forms, shifts and rotates, constant
// and register INPUT/OUTPUT, conditional jumps, CALL/RETURN, a counted loop
// and an interrupt with RETURNI. The input port returns 3*port_id+1 through
// one register stage, as the neuron's input multiplexer does. Every OUTPUT
// is compared, in order, with a list of expected (port, value) pairs worked
// out by hand; the spacing of two writes checks the two-clock instruction
// rate.
module tb_kcpsm_core;
  import solar_pkg::*;

  logic   clk = 1'b0;
  logic   rst = 1'b1;
  logic   irq = 1'b0;
  instr_t rom [256];
  instr_t instruction;
  paddr_t address;
  byte_t  port_id, out_port, in_port;
  logic   rd, wr;
  int     checks = 0, failures = 0, cycle = 0;

  always #5 clk = ~clk;

  kcpsm_core dut (
    .clk(clk), .rst(rst), .interrupt(irq), .instruction(instruction),
    .address(address), .port_id(port_id), .out_port(out_port),
    .read_strobe(rd), .write_strobe(wr), .in_port(in_port)
  );

  always_ff @(posedge clk) instruction <= rom[address];
  always_ff @(posedge clk) in_port <= 8'(3 * port_id + 1);
  always_ff @(posedge clk) cycle <= cycle + 1;

  localparam int NEXP = 10;
  byte_t exp_port [NEXP] = '{8'h10, 8'h11, 8'h12, 8'h07, 8'h13, 8'h14, 8'h15, 8'h16, 8'h17, 8'h18};
  byte_t exp_val  [NEXP] = '{8'h45, 8'hF0, 8'h10, 8'h16, 8'h0A, 8'h85, 8'h86, 8'h5A, 8'h00, 8'hA5};
  int    wr_cycle [NEXP];
  int    nwr = 0;
  int    reads = 0;

  always @(posedge clk) begin
    if (!rst && rd) reads++;
    if (!rst && wr) begin
      checks++;
      if (nwr >= NEXP) begin
        failures++;
        $display("FAIL unexpected write port %h value %h", port_id, out_port);
      end else begin
        if (port_id !== exp_port[nwr] || out_port !== exp_val[nwr]) begin
          failures++;
          $display("FAIL write %0d: port %h value %h, expected port %h value %h",
                   nwr, port_id, out_port, exp_port[nwr], exp_val[nwr]);
        end
        wr_cycle[nwr] = cycle;
      end
      nwr++;
    end
  end

  initial begin
    for (int a = 0; a < 256; a++) rom[a] = i_load_k(4'h0, 8'h00);
    rom[8'h00] = i_int_en(1'b0);
    rom[8'h01] = i_load_k(4'h0, 8'h35);
    rom[8'h02] = i_load_k(4'h1, 8'h10);
    rom[8'h03] = i_alu_r(ALU_ADD, 4'h0, 4'h1);
    rom[8'h04] = i_output(4'h0, 8'h10);
    rom[8'h05] = i_alu_k(ALU_SUB, 4'h1, 8'h20);
    rom[8'h06] = i_output(4'h1, 8'h11);
    rom[8'h07] = i_jump_c(COND_C, 8'h09);
    rom[8'h08] = i_output(4'h0, 8'h99);
    rom[8'h09] = i_input(4'h2, 8'h05);
    rom[8'h0A] = i_output(4'h2, 8'h12);
    rom[8'h0B] = i_load_k(4'h3, 8'h07);
    rom[8'h0C] = i_input_r(4'h4, 4'h3);
    rom[8'h0D] = i_output_r(4'h4, 4'h3);
    rom[8'h0E] = i_alu_k(ALU_AND, 4'h0, 8'h0F);
    rom[8'h0F] = i_alu_r(ALU_OR, 4'h0, 4'h1);
    rom[8'h10] = i_alu_k(ALU_XOR, 4'h0, 8'hFF);
    rom[8'h11] = i_output(4'h0, 8'h13);
    rom[8'h12] = i_shift(4'h0, 1'b1, 3'd6);   // SR0
    rom[8'h13] = i_shift(4'h0, 1'b0, 3'd7);   // SL1
    rom[8'h14] = i_shift(4'h0, 1'b1, 3'd4);   // RR
    rom[8'h15] = i_output(4'h0, 8'h14);
    rom[8'h16] = i_alu_k(ALU_ADDC, 4'h0, 8'h00);
    rom[8'h17] = i_output(4'h0, 8'h15);
    rom[8'h18] = i_call(8'h40);
    rom[8'h19] = i_output(4'h5, 8'h16);
    rom[8'h1A] = i_load_k(4'h6, 8'h03);
    rom[8'h1B] = i_alu_k(ALU_SUB, 4'h6, 8'h01);
    rom[8'h1C] = i_jump_c(COND_NZ, 8'h1B);
    rom[8'h1D] = i_output(4'h6, 8'h17);
    rom[8'h1E] = i_int_en(1'b1);
    rom[8'h1F] = i_load_k(4'h8, 8'h01);
    rom[8'h20] = i_alu_k(ALU_ADD, 4'h8, 8'h01);
    rom[8'h21] = i_jump(8'h20);
    rom[8'h40] = i_load_k(4'h5, 8'h5A);
    rom[8'h41] = i_return();
    rom[8'h50] = i_load_k(4'h9, 8'hA5);
    rom[8'h51] = i_output(4'h9, 8'h18);
    rom[8'h52] = i_returni(1'b0);
    rom[8'hFF] = i_jump(8'h50);

    repeat (3) @(posedge clk);
    rst <= 1'b0;
    wait (nwr == 9);
    repeat (20) @(posedge clk);
    // interrupts were enabled by the program: raise the request
    irq <= 1'b1;
    repeat (4) @(posedge clk);
    irq <= 1'b0;
    repeat (40) @(posedge clk);

    checks++;
    if (nwr != NEXP) begin failures++; $display("FAIL %0d writes, expected %0d", nwr, NEXP); end
    // two instructions between the first two OUTPUTs: 4 clocks
    checks++;
    if (wr_cycle[1] - wr_cycle[0] != 4) begin
      failures++; $display("FAIL rate: %0d clocks for 2 instructions", wr_cycle[1] - wr_cycle[0]);
    end
    // 19..1D through a 3-pass loop is 8 instructions: 16 clocks
    checks++;
    if (wr_cycle[8] - wr_cycle[7] != 16) begin
      failures++; $display("FAIL loop timing: %0d clocks", wr_cycle[8] - wr_cycle[7]);
    end
    checks++;
    if (reads != 2) begin failures++; $display("FAIL %0d read strobes", reads); end
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
