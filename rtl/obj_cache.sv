// obj_cache: the tile's object store.
//
// Holds the state of every object whose home is this tile (one objword_t per
// object: a stored residual and a value). Tasks on a PE reach it through a
// single shared access port: each PE raises req with a read or write; one
// PE per cycle is granted, chosen round-robin, and sees the word at addr
// (before any write) on rdata in the same cycle. Two ports outrank the PEs:
// the commit queue's rollback port, which restores the value an aborted task
// overwrote, and the host port, which loads the graph and reads results.
// While either of them writes, no PE is granted.
//
// The document shows a per-tile cache holding the tile's objects, serving
// task accesses and rollbacks; that it is one array sized for all local
// objects (so it never misses and needs no memory behind it), the
// round-robin choice and the same-cycle read are this design's choices.
module obj_cache #(
  parameter int WORDS = 64,
  parameter int NREQ  = 4,
  localparam int AW   = (WORDS > 1) ? $clog2(WORDS) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // PE access ports
  input  logic [NREQ-1:0]       req,
  input  logic [NREQ-1:0]       we,
  input  logic [AW-1:0]         addr  [NREQ],
  input  chronos_pkg::objword_t wdata [NREQ],
  output logic [NREQ-1:0]       gnt,
  output chronos_pkg::objword_t rdata,
  // rollback port (commit queue)
  input  logic                  rb_we,
  input  logic [AW-1:0]         rb_addr,
  input  chronos_pkg::objword_t rb_wdata,
  // host port
  input  logic                  host_we,
  input  logic [AW-1:0]         host_addr,
  input  chronos_pkg::objword_t host_wdata,
  output chronos_pkg::objword_t host_rdata
);
  import chronos_pkg::*;

  objword_t mem [WORDS];
  localparam int IW = (NREQ > 1) ? $clog2(NREQ) : 1;
  logic [IW-1:0] rr_ptr;   // first requester to consider
  logic [IW-1:0] sel;
  logic          any;

  // requests rotated so that bit 0 is rr_ptr; the first set bit wins
  logic [NREQ-1:0] rot;
  always_comb begin
    for (int k = 0; k < NREQ; k++) rot[k] = req[(int'(rr_ptr) + k) % NREQ];
    any = 1'b0;
    sel = '0;
    for (int k = NREQ-1; k >= 0; k--)
      if (rot[k]) begin
        any = 1'b1;
        sel = IW'((int'(rr_ptr) + k) % NREQ);
      end
  end

  logic pe_go;
  assign pe_go = any && !rb_we && !host_we;

  always_comb begin
    gnt = '0;
    if (pe_go) gnt[sel] = 1'b1;
  end

  assign rdata      = mem[addr[sel]];
  assign host_rdata = mem[host_addr];

  always_ff @(posedge clk) begin
    if (rb_we)
      mem[rb_addr] <= rb_wdata;
    else if (host_we)
      mem[host_addr] <= host_wdata;
    else if (pe_go && we[sel])
      mem[addr[sel]] <= wdata[sel];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rr_ptr <= '0;
    else if (pe_go) rr_ptr <= IW'((int'(sel) + 1) % NREQ);
  end
endmodule
