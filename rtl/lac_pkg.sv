// lac_pkg: types and constants shared by the linear-algebra core.
//
// The core is an NR x NR array of processing elements (PEs) that performs
// small "panel updates" of GEMM, GEMV, TRSM, LUD, SpMV and SpMM, plus the
// row-bus transfers that move panels into and out of the PE registers.
// The 14-bit control word and its field names and widths follow the
// design's published control-word layout; the operation encodings, the
// instruction set and the register allocation are this design's own choice.
// Linting the package on its own reports its register-map constants as
// unused; pe_fsm and pe use them.
package lac_pkg;

  // Register address space seen by a PE (3-bit addresses): six general
  // registers R0..R5 plus the two broadcast buffers.
  localparam int unsigned NREG      = 6;
  localparam logic [2:0]  ADDR_RB   = 3'd6;  // row broadcast buffer (read only)
  localparam logic [2:0]  ADDR_CB   = 3'd7;  // column broadcast buffer (read only)

  // Register allocation used by the panel-update schedules.
  localparam logic [2:0]  R_BVAL    = 3'd4;  // B / b / X / a element (broadcast source)
  localparam logic [2:0]  R_CVAL    = 3'd5;  // C / c accumulator, or reciprocal r

  // Local memory of each PE: LM_DEPTH elements (256 x 4 bytes = 1 KB).
  localparam int unsigned LM_DEPTH  = 256;
  localparam int unsigned LM_AW     = $clog2(LM_DEPTH);

  // ALU operation (2 bits).
  typedef enum logic [1:0] {
    ALU_MOV  = 2'b00,  // dst = rd1 ; reciprocal 1/rd1 when read_addr2 != 0 (diagonal PEs)
    ALU_MAC  = 2'b01,  // dst = dst + rd1 * CB
    ALU_MSUB = 2'b10,  // dst = dst - rd1 * CB
    ALU_MUL  = 2'b11   // dst = rd1 * rd2
  } alu_op_e;

  // 14-bit control word, most significant field first.
  typedef struct packed {
    alu_op_e    alu_op;       // [13:12]
    logic       rf_en;        // [11]
    logic [2:0] write_addr;   // [10:8]
    logic [2:0] read_addr2;   // [7:5]
    logic [2:0] read_addr1;   // [4:2]
    logic       row_buff_rd;  // [1]  row buffer loads from the row bus
    logic       col_buff_rd;  // [0]  column buffer loads from the column bus
  } ctrl_word_t;

  // Instructions issued by the local controller to all PEs.
  typedef enum logic [3:0] {
    OP_NOP         = 4'd0,
    OP_LOAD_PANEL  = 4'd1,  // element (i,j) of a panel -> R[reg] of PE(i,j)
    OP_LOAD_ROWREP = 4'd2,  // element (i,k) of a panel -> R[reg+k] of every PE in row i
    OP_STORE_PANEL = 4'd3,  // R[reg] of PE(i,j) -> row bus i in cycle j
    OP_GEMM        = 4'd4,
    OP_GEMV        = 4'd5,
    OP_TRSM        = 4'd6,
    OP_LUD         = 4'd7,
    OP_SPMV        = 4'd8,
    OP_SPMM        = 4'd9,
    OP_LM_READ     = 4'd10, // every PE: R[reg] = LM[addr]
    OP_LM_WRITE    = 4'd11  // every PE: LM[addr] = R[reg]
  } opcode_e;

  typedef struct packed {
    opcode_e    op;
    logic [2:0] rsel;   // register operand of the transfer instructions
    logic [LM_AW-1:0] addr;  // local-memory address of LM_READ / LM_WRITE
  } instr_t;

  // Number of cycles an instruction occupies the PE array.
  function automatic int unsigned op_cycles(opcode_e op, int unsigned nr);
    case (op)
      OP_LOAD_PANEL, OP_LOAD_ROWREP:     return nr + 1;
      OP_STORE_PANEL:                    return nr;
      OP_GEMM, OP_GEMV, OP_SPMV, OP_SPMM: return nr + 1;
      OP_TRSM:                           return 3 * nr;
      OP_LUD:                            return 5 * (nr - 1);
      OP_LM_READ:                        return 2;
      default:                           return 1;
    endcase
  endfunction

endpackage
