// pe_array: the NX x NY mesh of processing elements.
//
// PE(x,y) sits in column x (x grows to the east) and row y (y grows to the
// south), matching the names PE00, PE10 (east of PE00) and PE01 (south of
// PE00) of the 2x2 array in the processor's block diagram. Each PE reads
// the facing communication register of each of its four neighbours:
//   n_in(x,y) = s_reg(x,y-1)   s_in(x,y) = n_reg(x,y+1)
//   w_in(x,y) = e_reg(x-1,y)   e_in(x,y) = w_reg(x+1,y)
// At the edges the missing neighbour is replaced by a boundary input port,
// and the outward communication registers of the edge PEs are brought out.
// The boundary ports are how data enters and leaves the array: loading the
// register files by shifting words through the E-registers from the west
// edge, reading results out at the east edge, and supplying boundary-cell
// values to a stencil. That use of the edges is this design's choice; the
// mesh itself and its default 2x2 size follow the block diagram, which
// notes that the array extends to n x m PEs.
//
// All PEs receive the same instruction in the same cycle (see pe).
module pe_array
  import sca_pkg::*;
#(
  parameter int unsigned NX       = 2,
  parameter int unsigned NY       = 2,
  parameter int unsigned RF_DEPTH = 32
) (
  input  logic   clk,
  input  logic   rst_n,
  input  instr_t instr,
  input  word_t  north_in  [NX],   // seen by row 0 as its north neighbour
  input  word_t  south_in  [NX],   // seen by row NY-1 as its south neighbour
  input  word_t  west_in   [NY],   // seen by column 0 as its west neighbour
  input  word_t  east_in   [NY],   // seen by column NX-1 as its east neighbour
  output word_t  north_out [NX],   // N-registers of row 0
  output word_t  south_out [NX],   // S-registers of row NY-1
  output word_t  west_out  [NY],   // W-registers of column 0
  output word_t  east_out  [NY],   // E-registers of column NX-1
  output word_t  acc_out   [NY][NX]
);

  word_t n_reg [NY][NX];
  word_t s_reg [NY][NX];
  word_t w_reg [NY][NX];
  word_t e_reg [NY][NX];

  for (genvar y = 0; y < NY; y++) begin : g_row
    for (genvar x = 0; x < NX; x++) begin : g_col
      word_t n_in, s_in, w_in, e_in;

      if (y == 0)      begin : g_nb assign n_in = north_in[x];    end
      else             begin : g_nm assign n_in = s_reg[y-1][x];  end
      if (y == NY - 1) begin : g_sb assign s_in = south_in[x];    end
      else             begin : g_sm assign s_in = n_reg[y+1][x];  end
      if (x == 0)      begin : g_wb assign w_in = west_in[y];     end
      else             begin : g_wm assign w_in = e_reg[y][x-1];  end
      if (x == NX - 1) begin : g_eb assign e_in = east_in[y];     end
      else             begin : g_em assign e_in = w_reg[y][x+1];  end

      pe #(.RF_DEPTH(RF_DEPTH)) u_pe (
        .clk  (clk),
        .rst_n(rst_n),
        .instr(instr),
        .n_in (n_in),
        .s_in (s_in),
        .w_in (w_in),
        .e_in (e_in),
        .n_reg(n_reg[y][x]),
        .s_reg(s_reg[y][x]),
        .w_reg(w_reg[y][x]),
        .e_reg(e_reg[y][x]),
        .acc  (acc_out[y][x])
      );
    end
  end

  for (genvar x = 0; x < NX; x++) begin : g_ns_out
    assign north_out[x] = n_reg[0][x];
    assign south_out[x] = s_reg[NY-1][x];
  end
  for (genvar y = 0; y < NY; y++) begin : g_we_out
    assign west_out[y] = w_reg[y][0];
    assign east_out[y] = e_reg[y][NX-1];
  end

endmodule
