// bw_mult: Baugh-Wooley signed (two's complement) array multiplier.
//
// Forms p = a * b for signed a (AW bits) and b (BW bits) from an array of
// AND-gate partial products that are all added, with no negative rows:
// the partial products that involve exactly one sign bit are inverted, the
// one involving both sign bits is kept, and the constant
// 2^(AW-1) + 2^(BW-1) + 2^(AW+BW-1) is added. Modulo 2^(AW+BW) this equals
// the signed product. The rows are summed with ordinary adders here; a
// carry-save tree is left to synthesis. Combinational.
// The choice of a Baugh-Wooley multiplier follows the original design; the
// widths are this design's choice.
module bw_mult #(
  parameter int unsigned AW = 22,
  parameter int unsigned BW = 16
) (
  input  logic signed [AW-1:0]    a,
  input  logic signed [BW-1:0]    b,
  output logic signed [AW+BW-1:0] p
);
  localparam int unsigned PW = AW + BW;
  localparam logic [PW-1:0] K = (PW'(1) << (AW - 1)) + (PW'(1) << (BW - 1))
                              + (PW'(1) << (PW - 1));

  logic [AW-1:0] row [BW];  // partial-product row j, bit i = a_i & b_j

  always_comb begin
    for (int j = 0; j < BW; j++) begin
      for (int i = 0; i < AW; i++) begin
        row[j][i] = a[i] & b[j];
        if ((i == AW - 1) != (j == BW - 1)) row[j][i] = ~row[j][i];
      end
    end
  end

  always_comb begin
    logic [PW-1:0] acc;
    acc = K;
    for (int j = 0; j < BW; j++) acc = acc + (PW'(row[j]) << j);
    p = signed'(acc);
  end
endmodule
