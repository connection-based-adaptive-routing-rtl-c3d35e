// age_arbiter: oldest-first arbiter.
//
// Grants the requester whose packet has resided longest at the switch, the
// crossbar policy used for all results (it removes local unfairness). Each
// requester presents the time stamp taken when its packet arrived; the age is
// now - stamp (modulo 2^TIME_W, so stamps stay valid across wrap-around as long
// as no packet is older than 2^(TIME_W-1) cycles). Ties go to the lowest
// index. Purely combinational: gnt is one-hot (or zero when nothing requests)
// in the same cycle as req. The tie rule is this design's choice.
module age_arbiter #(
  parameter int unsigned N      = 5,
  parameter int unsigned TIME_W = 16
) (
  input  logic [TIME_W-1:0] now,
  input  logic [N-1:0]      req,
  input  logic [TIME_W-1:0] stamp [N],
  output logic [N-1:0]      gnt,
  output logic              any_gnt,
  output logic [$clog2(N > 1 ? N : 2)-1:0] gnt_idx
);
  logic [TIME_W-1:0] best_age, age;
  always_comb begin
    gnt      = '0;
    gnt_idx  = '0;
    any_gnt  = 1'b0;
    best_age = '0;
    for (int unsigned i = 0; i < N; i++) begin
      age = now - stamp[i];
      if (req[i] && (!any_gnt || age > best_age)) begin
        any_gnt  = 1'b1;
        best_age = age;
        gnt_idx  = i[$bits(gnt_idx)-1:0];
      end
    end
    if (any_gnt) gnt[gnt_idx] = 1'b1;
  end
endmodule
