// pe_link_buf: registered handshake stage between the tile and a PE.
//
// A one-entry buffer on a valid/ready stream. in_ready depends only on the
// stored state, never on out_ready, and out_valid only on the stored state,
// so the tile's dispatch logic and the PE's acceptance logic are never joined
// by a combinational path. Without such a register both sides of the link
// compute their handshake combinationally from each other, which forms a
// combinational loop that an FPGA flow refuses to implement; the document
// fixes the PE/tile interface this way.
//
// Timing: a word written in cycle t is offered from cycle t+1; the buffer
// takes a new word only when empty (half throughput, enough because the tile
// sends a PE one task at a time). flush empties it (used when the task it
// holds is aborted). The one-entry depth is this design's choice.
module pe_link_buf #(
  parameter type T = chronos_pkg::job_t
) (
  input  logic clk,
  input  logic rst_n,
  input  logic flush,
  input  logic in_valid,
  input  T     in_data,
  output logic in_ready,
  output logic out_valid,
  output T     out_data,
  input  logic out_ready
);
  logic full_q;
  T     data_q;

  assign in_ready  = !full_q;
  assign out_valid = full_q;
  assign out_data  = data_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) full_q <= 1'b0;
    else if (flush) full_q <= 1'b0;
    else if (full_q && out_ready) full_q <= 1'b0;
    else if (!full_q && in_valid) full_q <= 1'b1;
  end

  always_ff @(posedge clk)
    if (!full_q && in_valid) data_q <= in_data;

`ifndef SYNTHESIS
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (out_valid && !out_ready && !flush) |=> (out_valid && $stable(out_data)));
`endif
endmodule
