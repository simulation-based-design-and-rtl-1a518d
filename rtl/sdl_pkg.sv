// sdl_pkg: widths, constants and types shared by the secure data link.
//
// The link generates 128-bit data, encrypts it with a modified DES (112-bit
// key, sixteen 96-bit round keys), protects it with a Hamming (224,128) code
// (32 Hamming (7,4) words), pads it to 256 bits and scrambles it with a
// modified iterated product cipher (128-bit keys). The receiver undoes the
// chain. The widths are those of the source design; the ALU control encoding
// is this design's own.
package sdl_pkg;

  localparam int unsigned DATA_W   = 128; // generated / middle data
  localparam int unsigned DESKEY_W = 112; // modified DES cipher key
  localparam int unsigned RKEY_W   = 96;  // modified DES round key
  localparam int unsigned HALF_W   = 64;  // Feistel half
  localparam int unsigned ROUNDS   = 16;  // modified DES rounds
  localparam int unsigned HAM_W    = 224; // Hamming (224,128) code word
  localparam int unsigned CODE_W   = 256; // transmitted coded data
  localparam int unsigned IPCKEY_W = 128; // product cipher key
  localparam int unsigned WORDS    = 32;  // 4-bit words per 128 bits

  // ALU operation codes carried by the 4-bit control signal.
  typedef enum logic [3:0] {
    OP_ADD  = 4'h0, OP_SUB  = 4'h1, OP_INC  = 4'h2, OP_DEC  = 4'h3,
    OP_AND  = 4'h4, OP_OR   = 4'h5, OP_XOR  = 4'h6, OP_XNOR = 4'h7,
    OP_NOTA = 4'h8, OP_NOTB = 4'h9, OP_NAND = 4'hA, OP_NOR  = 4'hB,
    OP_SHL  = 4'hC, OP_SHR  = 4'hD, OP_ROL  = 4'hE, OP_PASB = 4'hF
  } alu_op_e;

  // Which functional unit of the ALU drives the result.
  typedef enum logic [1:0] {SEL_ADDER, SEL_LOGIC, SEL_SHIFT} res_sel_e;
  typedef enum logic [1:0] {LF_AND, LF_OR, LF_XOR, LF_PASS} logic_fn_e;
  typedef enum logic [1:0] {SH_LEFT, SH_RIGHT, SH_ROTL} shift_fn_e;

  // Control signals produced by the control unit for the ALU.
  typedef struct packed {
    res_sel_e  res_sel;    // adder, logic unit or shifter
    logic      b_zero;     // adder: use 0 instead of operand B
    logic      invert_b;   // adder: one's complement of its B input
    logic      carry_in;   // adder: carry into bit 0
    logic_fn_e logic_fn;   // logic unit function
    logic      logic_on_b; // logic unit LF_PASS: pass B instead of A
    logic      invert_out; // logic unit: complement its result
    shift_fn_e shift_fn;   // shifter function
  } dgu_ctl_t;

endpackage
