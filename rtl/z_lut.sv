// z_lut: the z coordinate lookup table.
//
// One cell per position of the diamond-encoding distance pattern D_MZ, i.e. per
// digit value 0 .. 2*MZ^2+2*MZ of the (2*MZ^2+2*MZ+1)-ary system. Each cell holds
// an L2-bit segment value and a valid bit.
//   * search port (embedding): key is compared with every cell; the index of the
//     match is the DE secret digit S2 (lowest index on duplicates).
//   * read port (extraction): the cell at digit rdig is returned.
// Both ports are combinational. Built through the write port; reset loads the
// default layout, value = digit for the first 2^L2 digits.
module z_lut
  import stego_pkg::*;
#(
  parameter int unsigned MZ = MZ_DEF,
  parameter int unsigned L2 = L2_DEF,
  localparam int unsigned NZ = de_radix(MZ),
  localparam int unsigned DW = bits_for(NZ)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          we,
  input  logic [DW-1:0] waddr,
  input  logic          wvalid,
  input  logic [L2-1:0] wvalue,
  input  logic [L2-1:0] key,
  output logic [DW-1:0] sdig,
  output logic          shit,
  input  logic [DW-1:0] rdig,
  output logic [L2-1:0] rvalue,
  output logic          rhit
);
  logic          cvalid [NZ];
  logic [L2-1:0] cvalue [NZ];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < NZ; i++) begin
        cvalid[i] <= (i < (1 << L2));
        cvalue[i] <= L2'(i);
      end
    end else if (we && (32'(waddr) < NZ)) begin
      cvalid[waddr] <= wvalid;
      cvalue[waddr] <= wvalue;
    end
  end

  always_comb begin
    sdig = '0;
    shit = 1'b0;
    for (int i = int'(NZ) - 1; i >= 0; i--) begin
      if (cvalid[i] && cvalue[i] == key) begin
        sdig = DW'(i);
        shit = 1'b1;
      end
    end
  end

  always_comb begin
    rvalue = '0;
    rhit   = 1'b0;
    if (32'(rdig) < NZ) begin
      rvalue = cvalue[rdig];
      rhit   = cvalid[rdig];
    end
  end
endmodule
