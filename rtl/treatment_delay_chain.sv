// treatment_delay_chain: the delay modules that shift the treatment clock.
//
// `start` is the one-cycle strobe of a newly held retained pixel. stage[k] is
// that strobe delayed by k+1 principal cycles, so each stage of the treatment
// starts only once the previous one has finished. In the channel, start comes
// one cycle after the sampling impulse and the last stage opens the three
// writes, which end 9 cycles after the impulse, inside the 16-cycle treatment
// cycle. The delay modules are the source's; the number of stages follows
// this design's pipeline.
module treatment_delay_chain #(
  parameter int unsigned N_STAGES = 5
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                start,
  output logic [N_STAGES-1:0] stage
);

  always_ff @(posedge clk) begin
    if (rst) stage <= '0;
    else     stage <= {stage[N_STAGES-2:0], start};
  end

endmodule
