// kcpsm_core: 8-bit KCPSM (PicoBlaze) compatible controller, the processing
// engine of every SOLAR neuron.
//
// Function
//   An 8-bit Harvard RISC with 16 registers s0..sF, zero and carry flags, a
//   15-entry CALL/RETURN stack, one interrupt input and 256 x 16-bit program
//   space. It executes the 49 KCPSM instructions: LOAD/AND/OR/XOR/ADD/ADDCY/
//   SUB/SUBCY with a constant or a register, ten shifts and rotates, INPUT
//   and OUTPUT with a constant or register port address, JUMP/CALL/RETURN
//   (unconditional or on Z, NZ, C, NC), RETURNI ENABLE/DISABLE and
//   ENABLE/DISABLE INTERRUPT. The encoding is listed in solar_pkg.
//
// Timing
//   Every instruction takes two clock cycles (phase 0, phase 1), so the
//   instruction rate is half the clock rate. The program memory is a
//   synchronous-read RAM: `address` is combinational and is the address of
//   the current instruction in phase 0 and of the next one in phase 1, so
//   `instruction` holds the current word during both phases.
//   port_id and out_port are valid during both phases, which lets the
//   neuron register its input multiplexer once; read_strobe and
//   write_strobe are high in phase 1 only. in_port is sampled at the end of
//   phase 1, together with all register, flag and program-counter updates.
//   An interrupt (input high while interrupts are enabled, seen in phase 1)
//   replaces the instruction about to complete: its address is pushed, the
//   flags are saved, interrupts are disabled and execution goes to FF.
//   `rst` is synchronous; it clears pc, phase, flags, stack pointer and the
//   interrupt enable, and holds `address` at 0. The register file and the
//   stack are not reset (they are RAM in an FPGA).
//
// The instruction set, the two-cycle execution and the 8/16-bit buses follow
// the document's description of PicoBlaze; the internal organisation is this
// design's own, as the document takes the core from the vendor.
module kcpsm_core
  import solar_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   interrupt,
  input  instr_t instruction,
  output paddr_t address,
  output byte_t  port_id,
  output byte_t  out_port,
  output logic   read_strobe,
  output logic   write_strobe,
  input  byte_t  in_port
);

  // ----------------------------------------------------------------- state
  logic   phase;
  paddr_t pc;
  byte_t  regs [16];
  logic   zf, cf;
  logic   int_en;
  logic   zf_save, cf_save;
  paddr_t stack [STACK_DEPTH];
  logic [3:0] sp;               // next free entry, 0..STACK_DEPTH-1

  // ---------------------------------------------------------------- decode
  opcode_e    op;
  logic [3:0] rx, ry;
  byte_t      kk, sx, sy;

  assign op = opcode_e'(instruction[15:12]);
  assign rx = instruction[11:8];
  assign ry = instruction[7:4];
  assign kk = instruction[7:0];
  assign sx = regs[rx];
  assign sy = regs[ry];

  logic is_alu, is_shift, is_in, is_out, is_flow;
  assign is_alu   = (instruction[15] == 1'b0) || (op == OP_ALU_R);
  assign is_shift = (op == OP_SHIFT);
  assign is_in    = (op == OP_IN_P)  || (op == OP_IN_R);
  assign is_out   = (op == OP_OUT_P) || (op == OP_OUT_R);
  assign is_flow  = (op == OP_FLOW)  || (op == OP_FLOWC);

  assign port_id  = (op == OP_IN_R || op == OP_OUT_R) ? sy : kk;
  assign out_port = sx;

  logic take_int;
  assign take_int = int_en && interrupt;

  assign read_strobe  = phase && !take_int && is_in;
  assign write_strobe = phase && !take_int && is_out;

  // ------------------------------------------------------------------- ALU
  alu_e  alu_op;
  byte_t alu_b, alu_res;
  logic  alu_c, alu_wr_c;   // new carry, and whether the op writes flags
  always_comb begin
    alu_op   = (op == OP_ALU_R) ? alu_e'(instruction[2:0]) : alu_e'(instruction[14:12]);
    alu_b    = (op == OP_ALU_R) ? sy : kk;
    alu_c    = 1'b0;
    alu_wr_c = 1'b1;
    unique case (alu_op)
      ALU_LOAD: begin alu_res = alu_b; alu_wr_c = 1'b0; end
      ALU_AND:  alu_res = sx & alu_b;
      ALU_OR:   alu_res = sx | alu_b;
      ALU_XOR:  alu_res = sx ^ alu_b;
      ALU_ADD:  {alu_c, alu_res} = {1'b0, sx} + {1'b0, alu_b};
      ALU_ADDC: {alu_c, alu_res} = {1'b0, sx} + {1'b0, alu_b} + 9'(cf);
      ALU_SUB:  {alu_c, alu_res} = {1'b0, sx} - {1'b0, alu_b};
      ALU_SUBC: {alu_c, alu_res} = {1'b0, sx} - {1'b0, alu_b} - 9'(cf);
    endcase
  end

  // ---------------------------------------------------------- shift/rotate
  byte_t sh_res;
  logic  sh_c, sh_in;
  always_comb begin
    if (instruction[3]) begin        // right
      unique case (instruction[2:0])
        3'd0:    sh_in = cf;          // SRA
        3'd2:    sh_in = sx[7];       // SRX
        3'd4:    sh_in = sx[0];       // RR
        3'd7:    sh_in = 1'b1;        // SR1
        default: sh_in = 1'b0;        // SR0
      endcase
      sh_res = {sh_in, sx[7:1]};
      sh_c   = sx[0];
    end else begin                   // left
      unique case (instruction[2:0])
        3'd0:    sh_in = cf;          // SLA
        3'd2:    sh_in = sx[7];       // RL
        3'd4:    sh_in = sx[0];       // SLX
        3'd7:    sh_in = 1'b1;        // SL1
        default: sh_in = 1'b0;        // SL0
      endcase
      sh_res = {sx[6:0], sh_in};
      sh_c   = sx[7];
    end
  end

  // ---------------------------------------------------------- flow control
  logic cond_ok;
  always_comb begin
    if (instruction[12] == 1'b0) cond_ok = 1'b1;
    else begin
      unique case (cond_e'(instruction[11:10]))
        COND_Z:  cond_ok = zf;
        COND_NZ: cond_ok = !zf;
        COND_C:  cond_ok = cf;
        COND_NC: cond_ok = !cf;
      endcase
    end
  end

  logic is_jump, is_call, is_ret, is_reti, is_ie;
  assign is_jump = is_flow && instruction[9:8] == 2'b01;
  assign is_call = is_flow && instruction[9:8] == 2'b11;
  assign is_ret  = is_flow && instruction[9:8] == 2'b00 && instruction[7:6] == 2'b10;
  assign is_reti = is_flow && instruction[9:8] == 2'b00 && instruction[7:6] == 2'b11;
  assign is_ie   = is_flow && instruction[9:8] == 2'b00 && instruction[7:6] == 2'b00;

  logic [3:0] sp_dec, sp_inc;
  assign sp_dec = (sp == 4'd0) ? 4'(STACK_DEPTH - 1) : sp - 4'd1;
  assign sp_inc = (sp == 4'(STACK_DEPTH - 1)) ? 4'd0 : sp + 4'd1;

  paddr_t pc_next;
  always_comb begin
    pc_next = pc + 8'd1;
    if (take_int)                                 pc_next = INT_VECTOR;
    else if ((is_jump || is_call) && cond_ok)     pc_next = kk;
    else if ((is_ret && cond_ok) || is_reti)      pc_next = stack[sp_dec];
  end

  assign address = rst ? '0 : (phase ? pc_next : pc);

  // ------------------------------------------------------------- execution
  always_ff @(posedge clk) begin
    if (rst) begin
      phase  <= 1'b0;
      pc     <= '0;
      zf     <= 1'b0;
      cf     <= 1'b0;
      int_en <= 1'b0;
      zf_save <= 1'b0;
      cf_save <= 1'b0;
      sp     <= '0;
    end else if (!phase) begin
      phase <= 1'b1;
    end else begin
      phase <= 1'b0;
      pc    <= pc_next;
      if (take_int) begin
        stack[sp] <= pc;
        sp        <= sp_inc;
        zf_save   <= zf;
        cf_save   <= cf;
        int_en    <= 1'b0;
      end else if (is_alu) begin
        regs[rx] <= alu_res;
        if (alu_wr_c) begin
          cf <= alu_c;
          zf <= (alu_res == '0);
        end
      end else if (is_shift) begin
        regs[rx] <= sh_res;
        cf <= sh_c;
        zf <= (sh_res == '0);
      end else if (is_in) begin
        regs[rx] <= in_port;
      end else if (is_call && cond_ok) begin
        stack[sp] <= pc + 8'd1;
        sp        <= sp_inc;
      end else if (is_ret && cond_ok) begin
        sp <= sp_dec;
      end else if (is_reti) begin
        sp     <= sp_dec;
        zf     <= zf_save;
        cf     <= cf_save;
        int_en <= instruction[5];
      end else if (is_ie) begin
        int_en <= instruction[5];
      end
    end
  end

endmodule
