// Consecutive register fragment: a plain shift register of LEN bits.
//
// A run of state bits that no logic taps (except its lowest bit, which is
// the run's output) only ever shifts. Written, as here, without reset and
// with a clock enable, FPGA synthesis maps such a run onto shift-register
// LUTs (SRL16 on 4-input LUT devices, SRL32 on 6-input LUT devices) instead
// of flip-flops. The shreg_extract attribute asks for that mapping.
//
// Every clock with en high: q[LEN-1] <= d, q[i] <= q[i+1]. The contents are
// brought out for observation; only q[0] is meant to be used by logic.
module srl_fragment #(
  parameter int unsigned LEN = 16
) (
  input  logic           clk,
  input  logic           en,
  input  logic           d,
  output logic [LEN-1:0] q
);
  (* shreg_extract = "yes" *) logic [LEN-1:0] sr;

  if (LEN == 1) begin : g_one
    always_ff @(posedge clk)
      if (en) sr <= d;
  end else begin : g_many
    always_ff @(posedge clk)
      if (en) sr <= {d, sr[LEN-1:1]};
  end

  assign q = sr;
endmodule
