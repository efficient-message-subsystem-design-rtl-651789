// gtlb: Global Translation Look-aside Buffer. Translates the destination
// virtual address of a message into the physical node that currently holds
// that piece of the named object.
//
// Each entry maps a contiguous run of virtual pages onto a prism of nodes in
// the 3-D mesh: a starting node plus an extent of 2^log_x by 2^log_y by
// 2^log_z nodes. Consecutive groups of 2^log_lppn pages ("local pages per
// node") go to consecutive nodes of the prism, x varying fastest, then y,
// then z. So one entry can spread a whole region of the address space across
// many nodes. The entry fields follow the original architecture; the interleaving order
// and the arithmetic that derives the node are this design's choice.
//
// The lookup is combinational: drive lookup_en and vaddr, and hit/node/miss
// are valid in the same cycle. miss is the Abort / GTLB-miss signal: the
// send is abandoned and system software fills the entry (fill_*) from the
// global page table, then retries. Several matching entries are resolved by
// the lowest index. Reset invalidates every entry.
module gtlb
  import msg_pkg::*;
#(
  parameter int unsigned ENTRIES = 4
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // fill port (system software)
  input  logic                       fill_en,
  input  logic [$clog2(ENTRIES)-1:0] fill_idx,
  input  gtlb_entry_t                fill_entry,
  // lookup
  input  logic                       lookup_en,
  input  logic [ADDR_W-1:0]          vaddr,
  output logic                       hit,
  output logic                       miss,
  output node_t                      node
);

  gtlb_entry_t tab_q [ENTRIES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++)
        tab_q[i] <= '0;
    end else if (fill_en) begin
      tab_q[fill_idx] <= fill_entry;
    end
  end

  logic [VPN_W-1:0] page;
  assign page = vaddr[ADDR_W-1:PAGE_BITS];

  logic [ENTRIES-1:0] match;
  always_comb begin
    for (int i = 0; i < ENTRIES; i++)
      match[i] = tab_q[i].valid && (page >= tab_q[i].vpn)
                 && ((page - tab_q[i].vpn) < tab_q[i].vlen);
  end

  // Node of the matching entry with the lowest index
  always_comb begin
    logic [VPN_W-1:0] off;
    logic [VPN_W-1:0] idx;
    logic [VPN_W-1:0] xo, yo, zo;
    gtlb_entry_t      e;
    hit  = 1'b0;
    node = '0;
    e    = '0;
    for (int i = ENTRIES - 1; i >= 0; i--) begin
      if (match[i]) begin
        e   = tab_q[i];
        hit = 1'b1;
      end
    end
    off  = page - e.vpn;
    idx  = off >> e.log_lppn;
    xo   = idx & ((VPN_W'(1) << e.log_x) - 1);
    yo   = (idx >> e.log_x) & ((VPN_W'(1) << e.log_y) - 1);
    zo   = (idx >> (e.log_x + e.log_y)) & ((VPN_W'(1) << e.log_z) - 1);
    if (hit) begin
      node.x = e.start.x + xo[COORD_W-1:0];
      node.y = e.start.y + yo[COORD_W-1:0];
      node.z = e.start.z + zo[COORD_W-1:0];
    end
  end

  assign miss = lookup_en && !hit;

endmodule
