// solar_pkg: types, constants and helper functions shared by the SOLAR
// neuron array (self-organizing learning array built from PicoBlaze
// neurons).
//
// Contents
//   * sizes of the array (rows = neurons per layer = external inputs,
//     layers = columns), the program memory and the configuration word;
//   * the instruction encoding of the 8-bit KCPSM (PicoBlaze) controller
//     that every neuron runs; the field layout is the published KCPSM one,
//     which the encodings quoted for this design (ADD sX,sY = C014, SUB =
//     C016, DISABLE INTERRUPT = 8010, INPUT = Axpp, OUTPUT = Expp, JUMP =
//     81aa, LOAD sX,kk = 0Xkk) agree with;
//   * the host register map: input registers, the programme-reset read,
//     the configuration-bus write and the Gray-coded readback addresses of
//     the neuron output registers;
//   * the identical start-up program every neuron holds after power-up.
package solar_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned DATA_W   = 8;    // neuron data path
  localparam int unsigned INSTR_W  = 16;   // KCPSM instruction
  localparam int unsigned PADDR_W  = 8;    // program address, 256 words
  localparam int unsigned HADDR_W  = 6;    // host register address bits used
  localparam int unsigned SEL_W    = 5;    // neuron-select field of the config word
  localparam int unsigned CFG_W    = 29;   // {select[4:0], data[15:0], addr[7:0]}

  typedef logic [DATA_W-1:0]  byte_t;
  typedef logic [INSTR_W-1:0] instr_t;
  typedef logic [PADDR_W-1:0] paddr_t;

  // Configuration word written by the host to the configuration register.
  typedef struct packed {
    logic [SEL_W-1:0]   sel;   // bits 28..24: neuron select code
    logic [INSTR_W-1:0] data;  // bits 23..8 : instruction word
    logic [PADDR_W-1:0] addr;  // bits 7..0  : instruction address
  } cfg_word_t;

  // ------------------------------------------------- KCPSM instruction set
  // Bits 15..12 of an instruction.
  typedef enum logic [3:0] {
    OP_LOAD_K  = 4'h0, OP_AND_K  = 4'h1, OP_OR_K   = 4'h2, OP_XOR_K  = 4'h3,
    OP_ADD_K   = 4'h4, OP_ADDC_K = 4'h5, OP_SUB_K  = 4'h6, OP_SUBC_K = 4'h7,
    OP_FLOW    = 4'h8, OP_FLOWC  = 4'h9, OP_IN_P   = 4'hA, OP_IN_R   = 4'hB,
    OP_ALU_R   = 4'hC, OP_SHIFT  = 4'hD, OP_OUT_P  = 4'hE, OP_OUT_R  = 4'hF
  } opcode_e;

  // ALU operation: bits 14..12 for the constant forms, bits 2..0 for the
  // register form (opcode C).
  typedef enum logic [2:0] {
    ALU_LOAD = 3'd0, ALU_AND = 3'd1, ALU_OR = 3'd2, ALU_XOR = 3'd3,
    ALU_ADD  = 3'd4, ALU_ADDC = 3'd5, ALU_SUB = 3'd6, ALU_SUBC = 3'd7
  } alu_e;

  // Flow-control condition, bits 11..10 when bit 12 is set.
  typedef enum logic [1:0] {
    COND_Z = 2'd0, COND_NZ = 2'd1, COND_C = 2'd2, COND_NC = 2'd3
  } cond_e;

  localparam paddr_t INT_VECTOR  = 8'hFF; // interrupt vector
  localparam int unsigned STACK_DEPTH = 15;

  // Instruction builders, used for start-up code and by testbenches.
  function automatic instr_t i_load_k(input logic [3:0] x, input byte_t k);
    return {4'h0, x, k};
  endfunction
  function automatic instr_t i_alu_k(input alu_e op, input logic [3:0] x, input byte_t k);
    return {1'b0, op, x, k};
  endfunction
  function automatic instr_t i_alu_r(input alu_e op, input logic [3:0] x, input logic [3:0] y);
    return {4'hC, x, y, 1'b0, op};
  endfunction
  function automatic instr_t i_input(input logic [3:0] x, input byte_t p);
    return {4'hA, x, p};
  endfunction
  function automatic instr_t i_input_r(input logic [3:0] x, input logic [3:0] y);
    return {4'hB, x, y, 4'h0};
  endfunction
  function automatic instr_t i_output(input logic [3:0] x, input byte_t p);
    return {4'hE, x, p};
  endfunction
  function automatic instr_t i_output_r(input logic [3:0] x, input logic [3:0] y);
    return {4'hF, x, y, 4'h0};
  endfunction
  function automatic instr_t i_jump(input paddr_t a);
    return {8'h81, a};
  endfunction
  function automatic instr_t i_jump_c(input cond_e c, input paddr_t a);
    return {4'h9, c, 2'b01, a};
  endfunction
  function automatic instr_t i_call(input paddr_t a);
    return {8'h83, a};
  endfunction
  function automatic instr_t i_call_c(input cond_e c, input paddr_t a);
    return {4'h9, c, 2'b11, a};
  endfunction
  function automatic instr_t i_return();
    return 16'h8080;
  endfunction
  function automatic instr_t i_return_c(input cond_e c);
    return {4'h9, c, 2'b00, 8'h80};
  endfunction
  function automatic instr_t i_returni(input logic en);
    return {8'h80, 2'b11, en, 5'h10};
  endfunction
  function automatic instr_t i_int_en(input logic en);
    return {8'h80, 2'b00, en, 5'h10};
  endfunction
  // Shift / rotate: bit 3 = right, bits 2..0 select the kind.
  //   left : SLA=0 RL=2 SLX=4 SL0=6 SL1=7
  //   right: SRA=0 SRX=2 RR=4 SR0=6 SR1=7
  function automatic instr_t i_shift(input logic [3:0] x, input logic right, input logic [2:0] kind);
    return {4'hD, x, 4'h0, right, kind};
  endfunction

  // Identical start-up program of every neuron: add the two external
  // inputs (ports 00 and 01) and write the sum to output port 00, forever.
  function automatic instr_t boot_word(input paddr_t a);
    case (a)
      8'd0:    return 16'hA000;  // INPUT  s0, 00
      8'd1:    return 16'hA101;  // INPUT  s1, 01
      8'd2:    return 16'hC014;  // ADD    s0, s1
      8'd3:    return 16'hE000;  // OUTPUT s0, 00
      8'd4:    return 16'h8100;  // JUMP   00
      default: return 16'h0000;  // LOAD   s0, 00 (never reached)
    endcase
  endfunction

  // ------------------------------------------------------ host register map
  // Addresses 0 and 1 belong to the PCI interface (control/status and DMA
  // counter). External input r (0-based) is written and read at 2+r; the
  // programme reset is a read of 2+ROWS and the configuration register a
  // write to 3+ROWS (4 and 5 for the two-row array).
  function automatic logic [HADDR_W-1:0] in_reg_addr(input int unsigned r);
    return HADDR_W'(2 + r);
  endfunction
  function automatic logic [HADDR_W-1:0] prog_rst_addr(input int unsigned rows);
    return HADDR_W'(2 + rows);
  endfunction
  function automatic logic [HADDR_W-1:0] cfg_reg_addr(input int unsigned rows);
    return HADDR_W'(3 + rows);
  endfunction
  // Output register of neuron k (0-based, layer-major: k = rows*layer + row)
  // is read at the Gray code of k+8.
  function automatic logic [HADDR_W-1:0] nn_rd_addr(input int unsigned k);
    logic [HADDR_W-1:0] b;
    b = HADDR_W'(k + 8);
    return b ^ (b >> 1);
  endfunction
  // Neuron-select code of neuron k on the configuration bus.
  function automatic logic [SEL_W-1:0] nn_sel_code(input int unsigned k);
    return SEL_W'(k + 2);
  endfunction

endpackage
