// writing_authorization: the writing clock of the corrected-image memory.
//
// `start` (one cycle) opens the writing phase of a retained pixel. If
// `active` is high in that cycle, `we` is raised on that cycle and the next
// N-1 cycles (N = 3: one write per correspondent), and `rot` with it, so the
// address word rotates after each write. A passive pixel writes nothing.
// `busy` is high during the phase. The source names the block and its input
// (the active bit); the counter realising it is this design's.
module writing_authorization #(
  parameter int unsigned N = rectif_pkg::N_CORR
) (
  input  logic clk,
  input  logic rst,
  input  logic start,
  input  logic active,
  output logic we,
  output logic rot,
  output logic busy
);

  localparam int unsigned CW = $clog2(N + 1);

  logic [CW-1:0] remaining;   // writes left after this cycle

  always_ff @(posedge clk) begin
    if (rst)
      remaining <= '0;
    else if (start)
      remaining <= active ? CW'(N - 1) : '0;
    else if (remaining != 0)
      remaining <= remaining - 1'b1;
  end

  always_comb begin
    we   = (start && active) || (remaining != 0);
    rot  = we;
    busy = we;
  end

  // A new pixel may not start while the previous one is still being written.
  assert property (@(posedge clk) disable iff (rst) start |-> remaining == 0);

endmodule
