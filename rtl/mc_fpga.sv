// mc_fpga: multi-context FPGA built from RCM-based cells (top level).
//
// An NX x NY cellular array. Every cell is a multi-context logic block and
// an RCM switch block (mc_cell). Neighbouring cells are joined by W_S
// single-length tracks per side. W_D double-length tracks per side skip the
// next cell and land in the cell two steps away, for fast transfers over
// distance. A track that would come from outside the array is taken from
// the matching bit of s_ext_in / d_ext_in. Those inputs are read only at the
// array edge. Every cell's outgoing tracks are visible on s_out_all /
// d_out_all, so signals leaving at the edge are outputs of the array.
//
// Contexts: ctx_id is registered every clock; the registered context
// (ctx_cur) drives all cells, so a context switch takes effect one clock
// after ctx_id changes and the new context's logic and routing are in place
// within that clock. Configuration: all cells' configuration memories form
// one scan chain. cfg_si enters cell NX*NY-1 and cell 0's MSB leaves on
// cfg_so. Shifting the packed array cell_cfg_t [0:NX*NY-1] in MSB first
// (NX*NY*CELL_CFG_W clocks with cfg_shift high) leaves cell i with element
// i. Cell i sits at x = i % NX, y = i / NX, and y grows toward the north.
//
// The 3x3 array, the cells made of a logic block and an RCM, and the
// double-length lines follow the architecture. The track counts, the scan
// loading and the registered context ID are this design's choices.
//
// A fabric like this has configurable combinational paths that run through
// several cells and back. Loops in the structure are therefore inherent and
// left as they are. A configuration that closes a loop in one context is a
// configuration error, not a property of the RTL.
module mc_fpga
  import mc_pkg::*;
#(
  parameter int unsigned NX = 3,
  parameter int unsigned NY = 3
) (
  input  logic                                          clk,
  input  logic                                          rst_n,
  input  ctx_t                                          ctx_id,
  output ctx_t                                          ctx_cur,
  input  logic                                          cfg_shift,
  input  logic                                          cfg_si,
  output logic                                          cfg_so,
  input  logic [NX-1:0][NY-1:0][N_SIDES-1:0][W_S-1:0]   s_ext_in,
  input  logic [NX-1:0][NY-1:0][N_SIDES-1:0][W_D-1:0]   d_ext_in,
  output logic [NX-1:0][NY-1:0][N_SIDES-1:0][W_S-1:0]   s_out_all,
  output logic [NX-1:0][NY-1:0][N_SIDES-1:0][W_D-1:0]   d_out_all,
  output logic [NX-1:0][NY-1:0]                         lb_out,
  output logic                                          conflict
);

  localparam int unsigned NCELL = NX * NY;

  ctx_t ctx_q;
  always_ff @(posedge clk) begin
    if (!rst_n) ctx_q <= '0;
    else        ctx_q <= ctx_id;
  end
  assign ctx_cur = ctx_q;

  // Scan chain: chain[i+1] feeds cell i, chain[NCELL] is cfg_si.
  logic [NCELL:0]     chain;
  logic [NCELL-1:0]   cell_conflict;
  assign chain[NCELL] = cfg_si;
  assign cfg_so       = chain[0];

  logic [NX-1:0][NY-1:0][N_SIDES-1:0][W_S-1:0] s_in_all;
  logic [NX-1:0][NY-1:0][N_SIDES-1:0][W_D-1:0] d_in_all;

  // dx/dy of the neighbour on each side: N, E, S, W.
  function automatic int nb_x(int x, int s, int step);
    return (s == 1) ? x + step : (s == 3) ? x - step : x;
  endfunction
  function automatic int nb_y(int y, int s, int step);
    return (s == 0) ? y + step : (s == 2) ? y - step : y;
  endfunction

  for (genvar x = 0; x < NX; x++) begin : g_x
    for (genvar y = 0; y < NY; y++) begin : g_y
      localparam int unsigned IDX = y * NX + x;
      cell_cfg_t cfg_q;

      // ---- track wiring into this cell ------------------------------------
      for (genvar s = 0; s < N_SIDES; s++) begin : g_side
        localparam int OPP = (s + 2) % 4;
        localparam int SX  = nb_x(x, s, 1);
        localparam int SY  = nb_y(y, s, 1);
        localparam int DX  = nb_x(x, s, 2);
        localparam int DY  = nb_y(y, s, 2);
        if (SX >= 0 && SX < NX && SY >= 0 && SY < NY) begin : g_s_int
          assign s_in_all[x][y][s] = s_out_all[SX][SY][OPP];
        end else begin : g_s_ext
          assign s_in_all[x][y][s] = s_ext_in[x][y][s];
        end
        if (DX >= 0 && DX < NX && DY >= 0 && DY < NY) begin : g_d_int
          assign d_in_all[x][y][s] = d_out_all[DX][DY][OPP];
        end else begin : g_d_ext
          assign d_in_all[x][y][s] = d_ext_in[x][y][s];
        end
      end

      mc_cfg_chain #(.W(CELL_CFG_W)) u_cfg (
        .clk     (clk),
        .shift_en(cfg_shift),
        .si      (chain[IDX+1]),
        .so      (chain[IDX]),
        .q       (cfg_q)
      );

      mc_cell u_cell (
        .clk     (clk),
        .rst_n   (rst_n),
        .ctx     (ctx_q),
        .cfg     (cfg_q),
        .s_in    (s_in_all[x][y]),
        .d_in    (d_in_all[x][y]),
        .s_out   (s_out_all[x][y]),
        .d_out   (d_out_all[x][y]),
        .lb_out  (lb_out[x][y]),
        .conflict(cell_conflict[IDX])
      );
    end
  end

  assign conflict = |cell_conflict;

endmodule
