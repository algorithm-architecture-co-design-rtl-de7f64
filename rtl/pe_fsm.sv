// pe_fsm: the FSM controller of one processing element.
//
// All PEs receive the same instruction from the local controller in the same
// cycle. Each PE's FSM then counts the steps of that instruction and derives,
// from the instruction, the step and its own position (ROW, COL), the
// 14-bit control word for its datapath plus two bus-drive strobes that put
// the PE's second register read port onto its row or column bus.
//
// Step schedules (NR = array size, m = iteration):
//   GEMM/GEMV/SpMV/SpMM, NR+1 steps: step s<NR row s drives R4 (B or b) onto
//     the column buses, all PEs latch it; step s>=1 all PEs
//     R5 += R[s-1] * CB.
//   TRSM, 3*NR steps: 0 diagonal PEs R5 = 1/A_ii; 1 diagonal PEs drive r
//     on the row bus, all latch; 2 row 0 X = B * r; then per m = 0..NR-2:
//     row m drives X on the column buses; rows > m B -= A_im * X_mj;
//     row m+1 X = B * r.
//   LUD, 5*(NR-1) steps, five per iteration m = 0..NR-2: PE(m,m) r = 1/u_mm;
//     PE(m,m) drives r and row m drives u_mj on the column buses; column m
//     below the diagonal l = a * r; column m drives l on the row buses; the
//     trailing sub-array a -= l * u. The document's schedule (3*NR-1 steps)
//     takes every reciprocal from the original diagonal, which is correct
//     only for NR = 2 because the trailing updates change a_mm; this design
//     forms each reciprocal after the diagonal element is final.
//   LOAD_PANEL / LOAD_ROWREP, NR+1 steps: step s<NR all PEs latch the row
//     bus; step s>=1 PE(i,s-1) (or every PE of the row) copies the buffer
//     into its register.
//   STORE_PANEL, NR steps: step s PE(i,s) drives R[rsel] onto row bus i.
//   LM_READ, 2 steps: every PE reads LM[addr], then writes it to R[rsel].
//   LM_WRITE, 1 step: every PE writes R[rsel] to LM[addr].
// The local-memory strobes (lm_en, lm_we, lm_addr, lm_to_rf) are outside
// the 14-bit control word, as are the two bus-drive strobes.
// The cycle counts of GEMM/GEMV/SpMV/SpMM and TRSM are those the document gives; the
// register allocation and the transfer instructions are this design's own.
module pe_fsm
  import lac_pkg::*;
#(
  parameter int unsigned NR  = 4,
  parameter int unsigned ROW = 0,
  parameter int unsigned COL = 0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  instr_t     instr,
  output ctrl_word_t cw,
  output logic       row_drv,
  output logic       col_drv,
  output logic       lm_en,
  output logic       lm_we,
  output logic [LM_AW-1:0] lm_addr,
  output logic       lm_to_rf,
  output logic       busy
);
  localparam int unsigned SW = $clog2(5 * NR + 1);

  instr_t        cur;
  logic [SW-1:0] step;
  logic [SW-1:0] last;

  assign last = SW'(op_cycles(cur.op, NR) - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      step <= '0;
      cur  <= '{op: OP_NOP, rsel: '0, addr: '0};
    end else if (start) begin
      busy <= 1'b1;
      step <= '0;
      cur  <= instr;
    end else if (busy) begin
      if (step == last) begin
        busy <= 1'b0;
        step <= '0;
      end else begin
        step <= step + 1'b1;
      end
    end
  end

  // Control word of this PE for the current step.
  always_comb begin
    int s, m, ph;
    cw       = '0;
    row_drv  = 1'b0;
    col_drv  = 1'b0;
    lm_en    = 1'b0;
    lm_we    = 1'b0;
    lm_addr  = cur.addr;
    lm_to_rf = 1'b0;
    s  = int'(step);
    m  = 0;
    ph = 0;
    if (busy) begin
      unique case (cur.op)
        OP_LOAD_PANEL, OP_LOAD_ROWREP: begin
          if (s < int'(NR)) cw.row_buff_rd = 1'b1;
          if (s >= 1 && (cur.op == OP_LOAD_ROWREP || int'(COL) == s - 1)) begin
            cw.alu_op     = ALU_MOV;
            cw.read_addr1 = ADDR_RB;
            cw.write_addr = (cur.op == OP_LOAD_ROWREP) ? cur.rsel + 3'(s - 1) : cur.rsel;
            cw.rf_en      = 1'b1;
          end
        end
        OP_STORE_PANEL: begin
          if (int'(COL) == s) begin
            row_drv       = 1'b1;
            cw.read_addr2 = cur.rsel;
          end
        end
        OP_GEMM, OP_GEMV, OP_SPMV, OP_SPMM: begin
          if (s < int'(NR)) begin
            cw.col_buff_rd = 1'b1;
            if (int'(ROW) == s) begin
              col_drv       = 1'b1;
              cw.read_addr2 = R_BVAL;
            end
          end
          if (s >= 1) begin
            cw.alu_op     = ALU_MAC;
            cw.read_addr1 = 3'(s - 1);
            cw.write_addr = R_CVAL;
            cw.rf_en      = 1'b1;
          end
        end
        OP_TRSM: begin
          if (s == 0) begin
            if (ROW == COL) begin
              cw.alu_op     = ALU_MOV;
              cw.read_addr1 = 3'(ROW);
              cw.read_addr2 = 3'd1;          // select the reciprocal
              cw.write_addr = R_CVAL;
              cw.rf_en      = 1'b1;
            end
          end else if (s == 1) begin
            cw.row_buff_rd = 1'b1;
            if (ROW == COL) begin
              row_drv       = 1'b1;
              cw.read_addr2 = R_CVAL;
            end
          end else if (s == 2) begin
            if (ROW == 0) begin
              cw.alu_op     = ALU_MUL;
              cw.read_addr1 = R_BVAL;
              cw.read_addr2 = ADDR_RB;
              cw.write_addr = R_BVAL;
              cw.rf_en      = 1'b1;
            end
          end else begin
            m  = (s - 3) / 3;
            ph = (s - 3) % 3;
            if (ph == 0) begin
              if (int'(ROW) > m) cw.col_buff_rd = 1'b1;   // only the rows being updated listen
              if (int'(ROW) == m) begin
                col_drv       = 1'b1;
                cw.read_addr2 = R_BVAL;
              end
            end else if (ph == 1) begin
              if (int'(ROW) > m) begin
                cw.alu_op     = ALU_MSUB;
                cw.read_addr1 = 3'(m);
                cw.write_addr = R_BVAL;
                cw.rf_en      = 1'b1;
              end
            end else begin
              if (int'(ROW) == m + 1) begin
                cw.alu_op     = ALU_MUL;
                cw.read_addr1 = R_BVAL;
                cw.read_addr2 = ADDR_RB;
                cw.write_addr = R_BVAL;
                cw.rf_en      = 1'b1;
              end
            end
          end
        end
        OP_LUD: begin
          m  = s / 5;
          ph = s % 5;
          if (ph == 0) begin
            if (int'(ROW) == m && int'(COL) == m) begin
              cw.alu_op     = ALU_MOV;           // r_mm = 1 / u_mm
              cw.read_addr1 = R_BVAL;
              cw.read_addr2 = 3'd1;              // select the reciprocal
              cw.write_addr = R_CVAL;
              cw.rf_en      = 1'b1;
            end
          end else if (ph == 1) begin
            if (int'(ROW) == m && int'(COL) == m) begin
              col_drv       = 1'b1;              // r_mm down column m
              cw.read_addr2 = R_CVAL;
            end else if (int'(ROW) == m && int'(COL) > m) begin
              col_drv       = 1'b1;              // u_mj down column j
              cw.read_addr2 = R_BVAL;
            end
            if (int'(ROW) > m && int'(COL) >= m) cw.col_buff_rd = 1'b1;
          end else if (ph == 2) begin
            if (int'(COL) == m && int'(ROW) > m) begin
              cw.alu_op     = ALU_MUL;           // l_im = a_im * r_mm
              cw.read_addr1 = R_BVAL;
              cw.read_addr2 = ADDR_CB;
              cw.write_addr = R_BVAL;
              cw.rf_en      = 1'b1;
            end
          end else if (ph == 3) begin
            if (int'(COL) == m && int'(ROW) > m) begin
              row_drv       = 1'b1;              // l_im along row i
              cw.read_addr2 = R_BVAL;
            end
            if (int'(ROW) > m && int'(COL) > m) cw.row_buff_rd = 1'b1;
          end else begin
            if (int'(ROW) > m && int'(COL) > m) begin
              cw.alu_op     = ALU_MSUB;          // a_ij -= l_im * u_mj
              cw.read_addr1 = ADDR_RB;
              cw.write_addr = R_BVAL;
              cw.rf_en      = 1'b1;
            end
          end
        end
        OP_LM_READ: begin
          if (s == 0) begin
            lm_en = 1'b1;                        // read the word
          end else begin
            lm_to_rf      = 1'b1;                // and write it to R[rsel]
            cw.write_addr = cur.rsel;
            cw.rf_en      = 1'b1;
          end
        end
        OP_LM_WRITE: begin
          lm_en         = 1'b1;
          lm_we         = 1'b1;
          cw.read_addr2 = cur.rsel;              // R[rsel] -> LM[addr]
        end
        default: ;
      endcase
    end
  end
endmodule
