// frame_shift_reg: 24-stage serial-in, parallel-out register that collects
// one TSL frame.
//
// On each shift_en the recovered DATA bit enters stage 0 and every stage
// moves one place on (q[i+1] <= q[i]). After the 24 shifts of a frame the
// register holds the frame from its first start bit (stage 23) to the
// fourth idle bit (stage 0); tsl_pkg names the stage of each field. This
// is the card's three cascaded 74LS164 registers. The register is not
// cleared between frames, as on the card; reset clears it.
//
// Interface: clk, rst_n, shift_en (one-clock strobe), din, q[23:0].
module frame_shift_reg #(
  parameter int unsigned FRAME_CLOCKS = tsl_pkg::FRAME_CLOCKS
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    shift_en,
  input  logic                    din,
  output logic [FRAME_CLOCKS-1:0] q
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)        q <= '0;
    else if (shift_en) q <= {q[FRAME_CLOCKS-2:0], din};
endmodule
