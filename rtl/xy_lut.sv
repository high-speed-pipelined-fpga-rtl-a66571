// xy_lut: the x-y coordinate lookup table.
//
// A grid of (2*MX+1) x (2*MY+1) cells. The column x is the EMD digit S0 and the
// row y is the EMD digit S1; each cell holds an L1-bit segment value and a valid
// bit (cells marked "xx" in the scheme's table are invalid). Cell (x,y) sits at
// index y*(2*MX+1)+x.
//   * search port (embedding): all cells are compared with key in parallel and the
//     coordinates of the matching cell are returned (lowest index on duplicates).
//   * read port (extraction): the cell at (rx,ry) is returned.
// Both ports are combinational. The table is built once per session through the
// write port (one cell per cycle) and can be rebuilt at any time between blocks;
// reset loads the row-major default layout, value = y*(2*MX+1)+x for the first
// 2^L1 cells. Loading arbitrary permutations turns the table into a shared key.
module xy_lut
  import stego_pkg::*;
#(
  parameter int unsigned MX = MX_DEF,
  parameter int unsigned MY = MY_DEF,
  parameter int unsigned L1 = L1_DEF,
  localparam int unsigned NX = emd_radix(MX),
  localparam int unsigned NY = emd_radix(MY),
  localparam int unsigned NCELL = NX * NY,
  localparam int unsigned AW = bits_for(NCELL),
  localparam int unsigned XW = bits_for(NX),
  localparam int unsigned YW = bits_for(NY)
) (
  input  logic          clk,
  input  logic          rst_n,
  // table construction
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic          wvalid,
  input  logic [L1-1:0] wvalue,
  // search port: key -> (x, y)
  input  logic [L1-1:0] key,
  output logic [XW-1:0] sx,
  output logic [YW-1:0] sy,
  output logic          shit,
  // read port: (x, y) -> value
  input  logic [XW-1:0] rx,
  input  logic [YW-1:0] ry,
  output logic [L1-1:0] rvalue,
  output logic          rhit
);
  logic          cvalid [NCELL];
  logic [L1-1:0] cvalue [NCELL];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < NCELL; i++) begin
        cvalid[i] <= (i < (1 << L1));
        cvalue[i] <= L1'(i);
      end
    end else if (we && (32'(waddr) < NCELL)) begin
      cvalid[waddr] <= wvalid;
      cvalue[waddr] <= wvalue;
    end
  end

  // Search: parallel compare, lowest matching index wins.
  always_comb begin
    sx   = '0;
    sy   = '0;
    shit = 1'b0;
    for (int y = int'(NY) - 1; y >= 0; y--) begin
      for (int x = int'(NX) - 1; x >= 0; x--) begin
        if (cvalid[y * NX + x] && cvalue[y * NX + x] == key) begin
          sx   = XW'(x);
          sy   = YW'(y);
          shit = 1'b1;
        end
      end
    end
  end

  // Read: direct index; coordinates outside the grid read as a miss.
  always_comb begin
    rvalue = '0;
    rhit   = 1'b0;
    if (32'(rx) < NX && 32'(ry) < NY) begin
      rvalue = cvalue[32'(ry) * NX + 32'(rx)];
      rhit   = cvalid[32'(ry) * NX + 32'(rx)];
    end
  end
endmodule
