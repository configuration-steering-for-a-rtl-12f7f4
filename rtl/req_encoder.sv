// req_encoder: resource requirements encoder, "7-bit unary to 3-bit binary".
//
// Collects one bit per instruction-queue entry (the bit of one unit type
// taken from every unit decoder) and outputs how many entries need that type.
// The input bits come from arbitrary entries, so the conversion is a
// population count; with seven entries the count fits in three bits.
// Purely combinational.
module req_encoder #(
  parameter int unsigned N   = 7,               // queue entries
  parameter int unsigned CW  = $clog2(N + 1)    // count width
) (
  input  logic [N-1:0]  need,     // bit i: entry i needs this unit type
  output logic [CW-1:0] count     // number of set bits
);

  always_comb begin
    count = '0;
    for (int i = 0; i < N; i++)
      count = count + CW'(need[i]);
  end

endmodule
