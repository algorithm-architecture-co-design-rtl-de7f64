// lac_core: one core of the dense/sparse linear-algebra accelerator.
//
// An NR x NR array of processing elements linked by NR row broadcast buses
// and NR column broadcast buses, driven by the local control unit. The core
// performs panel updates on NR x NR operands held one element (or one row)
// per PE: GEMM and SpMM update an NR x NR block of C, GEMV and SpMV update
// NR^2 elements of c, TRSM solves A X = B for a lower-triangular A in place
// of B, and LUD factorises a panel in place into unit-lower L and upper U.
// Larger problems are built from sequences of these updates.
//
// Every bus has at most one driver per cycle: one PE of the row (column), or
// on the row buses the external input during LOAD instructions. Row buses
// also carry data out of the core during STORE_PANEL: NR elements per cycle,
// the core's memory bandwidth of NR elements per cycle.
//
// Interface (all synchronous to clk, active-low asynchronous reset):
//   instr_valid / instr / instr_ready   instruction handshake
//   done                                last cycle of the current instruction
//   in_rd, in_col, in_data[NR]          LOAD: in cycles with in_rd = 1,
//                                       in_data[i] must hold element (i, in_col)
//   out_valid, out_col, out_data[NR]    STORE: element (i, out_col) on out_data[i]
// Cycle counts from acceptance to done: GEMM/GEMV/SpMV/SpMM NR+1, TRSM 3NR,
// LUD 5(NR-1) (the document's 3NR-1 schedule reuses stale reciprocals),
// loads NR+1, store NR.
// rst_n also appears in the assertions' disable condition, which lint
// reports as a net used both synchronously and asynchronously; the circuit
// uses it only as the asynchronous reset.
module lac_core
  import lac_pkg::*;
#(
  parameter int unsigned NR     = 4,
  parameter int unsigned DATA_W = 32,
  parameter int unsigned FRAC_W = 16
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  instr_valid,
  input  instr_t                instr,
  output logic                  instr_ready,
  output logic                  done,
  output logic                  in_rd,
  output logic [$clog2(NR)-1:0] in_col,
  input  logic [DATA_W-1:0]     in_data  [NR],
  output logic                  out_valid,
  output logic [$clog2(NR)-1:0] out_col,
  output logic [DATA_W-1:0]     out_data [NR]
);
  logic   pe_start;
  instr_t pe_instr;
  logic   lc_busy;

  logic [DATA_W-1:0] row_bus [NR];
  logic [DATA_W-1:0] col_bus [NR];
  logic [DATA_W-1:0] row_out [NR][NR];
  logic [DATA_W-1:0] col_out [NR][NR];
  logic [NR-1:0]     row_drv [NR];   // row_drv[i][j]: PE(i,j) drives row bus i
  logic [NR-1:0]     col_drv [NR];   // col_drv[j][i]: PE(i,j) drives column bus j
  logic              pe_busy [NR][NR];

  local_ctrl #(.NR(NR)) u_lc (
    .clk, .rst_n,
    .instr_valid, .instr_in(instr), .instr_ready,
    .pe_start, .pe_instr, .busy(lc_busy), .done,
    .in_rd, .in_col, .out_valid, .out_col
  );

  for (genvar i = 0; i < int'(NR); i++) begin : g_row
    for (genvar j = 0; j < int'(NR); j++) begin : g_col
      pe #(.NR(NR), .DATA_W(DATA_W), .FRAC_W(FRAC_W), .ROW(i), .COL(j)) u_pe (
        .clk, .rst_n,
        .start(pe_start), .instr(pe_instr),
        .row_bus(row_bus[i]), .col_bus(col_bus[j]),
        .row_out(row_out[i][j]), .col_out(col_out[i][j]),
        .row_drv(row_drv[i][j]), .col_drv(col_drv[j][i]),
        .busy(pe_busy[i][j])
      );
    end
  end

  // Broadcast buses: OR of the (zero when idle) PE outputs, or the external
  // input while a LOAD instruction streams data in.
  always_comb begin
    for (int i = 0; i < int'(NR); i++) begin
      row_bus[i] = '0;
      col_bus[i] = '0;
      for (int j = 0; j < int'(NR); j++) begin
        row_bus[i] = row_bus[i] | row_out[i][j];
        col_bus[i] = col_bus[i] | col_out[j][i];
      end
      if (in_rd) row_bus[i] = in_data[i];
      out_data[i] = row_bus[i];
    end
  end

  for (genvar i = 0; i < int'(NR); i++) begin : g_chk
    a_row_one_driver : assert property (@(posedge clk) disable iff (!rst_n)
        $onehot0(row_drv[i]) && !(in_rd && row_drv[i] != '0));
    a_col_one_driver : assert property (@(posedge clk) disable iff (!rst_n)
        $onehot0(col_drv[i]));
  end
  // The PE FSMs run in lockstep with the local controller.
  a_lockstep : assert property (@(posedge clk) disable iff (!rst_n) pe_busy[0][0] == lc_busy);
  // The register allocation keeps one panel row in R0..R(NR-1).
  initial assert (NR >= 2 && NR <= 4) else $error("NR must be 2..4 for this register allocation");
endmodule
