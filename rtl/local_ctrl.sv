// local_ctrl: local control unit of one core.
//
// Accepts one instruction at a time (valid/ready handshake), forwards it to
// the PE FSMs with a one-cycle start strobe, and keeps its own count of the
// instruction's cycles so that it can report completion and sequence the
// core's external data transfers:
//   - LOAD_PANEL / LOAD_ROWREP: in_rd is high for NR cycles; in cycle t the
//     core's row buses carry column in_col = t of the panel supplied by the
//     on-chip memory side.
//   - STORE_PANEL: out_valid is high for NR cycles; in cycle t the row buses
//     carry column out_col = t of the stored panel.
// done pulses in the last cycle of every instruction. A new instruction is
// accepted in the cycle after done (ready = !busy). The document gives the
// unit's role (scheduling panel updates and data flow) but not its insides;
// this controller is the simplest one that issues instructions one by one.
// rst_n also appears in the assertions' disable condition, which lint
// reports as a net used both synchronously and asynchronously; the circuit
// uses it only as the asynchronous reset.
module local_ctrl
  import lac_pkg::*;
#(
  parameter int unsigned NR = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  instr_valid,
  input  instr_t                instr_in,
  output logic                  instr_ready,
  output logic                  pe_start,
  output instr_t                pe_instr,
  output logic                  busy,
  output logic                  done,
  output logic                  in_rd,
  output logic [$clog2(NR)-1:0] in_col,
  output logic                  out_valid,
  output logic [$clog2(NR)-1:0] out_col
);
  localparam int unsigned SW = $clog2(5 * NR + 1);

  opcode_e       cur_op;   // only the opcode matters here; the PEs keep the rest
  logic [SW-1:0] step;
  logic          last;

  assign instr_ready = !busy;
  assign pe_start    = instr_valid && instr_ready;
  assign pe_instr    = instr_in;
  assign last        = busy && (int'(step) == int'(op_cycles(cur_op, NR)) - 1);
  assign done        = last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      step <= '0;
      cur_op <= OP_NOP;
    end else if (pe_start) begin
      busy <= 1'b1;
      step <= '0;
      cur_op <= instr_in.op;
    end else if (busy) begin
      if (last) begin
        busy <= 1'b0;
        step <= '0;
      end else begin
        step <= step + 1'b1;
      end
    end
  end

  always_comb begin
    in_rd     = busy && (cur_op == OP_LOAD_PANEL || cur_op == OP_LOAD_ROWREP) && (int'(step) < int'(NR));
    out_valid = busy && (cur_op == OP_STORE_PANEL) && (int'(step) < int'(NR));
    in_col    = $clog2(NR)'(step);
    out_col   = $clog2(NR)'(step);
  end

  a_handshake : assert property (@(posedge clk) disable iff (!rst_n)
                                 instr_valid && !instr_ready |=> instr_valid)
    else $error("instr_valid dropped before it was accepted");
endmodule
