// psb_array: ROWS x COLS processing elements in a torus interconnect.
//
// Each PE reads the data and predicate output registers of its north,
// south, east and west neighbours; the edges wrap around (torus), so every
// PE has the same four neighbours pattern and a mapping can be shifted
// across the array. The predicate outputs form the predicate network used
// by partial predication. Each row shares one bus to its data memory bank:
// the PEs of a row that issue a load or store in the same cycle are served
// lowest column first, and only one is expected (an assertion reports a
// conflict). The data a row bus delivered in a cycle is registered and
// offered to every PE of that row as its BUS operand in the next cycle.
// Only the designated PE (BR_ROW, BR_COL) has its branch outcome and path
// length wired to the IFU; the branch outputs of all other PEs are left
// open. The torus, the 4x4 size and the single designated PE follow the
// design; the designated position (the second PE of the first row, as in
// the design's examples), the one-bank-per-row bus and its priority order
// are choices of this implementation.
module psb_array
  import psb_pkg::*;
#(
  parameter int unsigned R      = ROWS,
  parameter int unsigned C      = COLS,
  parameter int unsigned BR_ROW = 0,
  parameter int unsigned BR_COL = 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  instr_t        instr     [R*C],   // index r*C + c
  output mem_req_t      row_mem   [R],     // to the row's data memory bank
  input  logic [DW-1:0] row_rdata [R],
  output br_info_t      br,                // designated PE -> IFU
  output logic [DW-1:0] dout      [R*C],   // PE data output registers
  output logic          pout      [R*C]    // PE predicate output registers
);

  mem_req_t      pe_mem [R*C];
  br_info_t      pe_br  [R*C];
  logic [DW-1:0] bus_q  [R];

  for (genvar r = 0; r < int'(R); r++) begin : g_row
    for (genvar c = 0; c < int'(C); c++) begin : g_col
      localparam int unsigned RN = (r + R - 1) % R;
      localparam int unsigned RS = (r + 1) % R;
      localparam int unsigned CE = (c + 1) % C;
      localparam int unsigned CWS = (c + C - 1) % C;
      psb_pe u_pe (
        .clk, .rst_n, .en,
        .instr     (instr[r*C + c]),
        .in_n      (dout[RN*C + c]),
        .in_s      (dout[RS*C + c]),
        .in_e      (dout[r*C + CE]),
        .in_w      (dout[r*C + CWS]),
        .pin_n     (pout[RN*C + c]),
        .pin_s     (pout[RS*C + c]),
        .pin_e     (pout[r*C + CE]),
        .pin_w     (pout[r*C + CWS]),
        .bus_in    (bus_q[r]),
        .mem       (pe_mem[r*C + c]),
        .mem_rdata (row_rdata[r]),
        .dout      (dout[r*C + c]),
        .pout      (pout[r*C + c]),
        .br        (pe_br[r*C + c])
      );
    end

    // Row bus: lowest requesting column owns the bus this cycle.
    always_comb begin
      row_mem[r] = '0;
      for (int c = C - 1; c >= 0; c--) begin
        if (pe_mem[r*C + c].req) row_mem[r] = pe_mem[r*C + c];
      end
    end

    always_ff @(posedge clk) begin
      if (!rst_n)                             bus_q[r] <= '0;
      else if (row_mem[r].req && !row_mem[r].we) bus_q[r] <= row_rdata[r];
    end

    // At most one memory access per row and cycle.
    always_ff @(posedge clk) begin
      if (rst_n) begin
        int n;
        n = 0;
        for (int c = 0; c < int'(C); c++) n += int'(pe_mem[r*C + c].req);
        assert (n <= 1) else $error("psb_array: row %0d bus conflict", r);
      end
    end
  end

  assign br = pe_br[BR_ROW*C + BR_COL];

endmodule
