// msg_subsystem: the message subsystem of one processor node, wired
// together.
//
// Output side: a user thread composes a message directly in one bank of MC
// registers and launches it with a SEND that names the bank, the length,
// the destination object (a pointer) and the handler to run there (the
// dispatchIP pointer). SEND validation holds the SEND at issue until every
// MC register it uses is present, the output port is free and the OMBC
// allows another throttled message. The output controller then translates
// the destination through the GTLB and streams the message, with the
// argument count and this node's ID inserted by hardware, from the MC
// registers into the network, while the thread runs on. The SEND's
// condition-code register is not present during injection and becomes TRUE
// when the last MC word has been read.
//
// Input side: one input unit per network priority (0 for user messages,
// 1 for system messages such as Acknowledges) queues the arriving words and
// presents them to that priority's message thread through R_head and R_body.
//
// Throttling: the OMBC counts how many more bounced messages the local
// bounce buffer can hold. Each throttled message injected decrements it;
// system software increments it per Acknowledge; at zero, user SENDs stall
// and ombc_zero_event tells the system.
//
// Not inside this module: the processor pipeline that issues SENDs and
// writes registers, the message handlers (software), the GTLB miss handler,
// the LTLB and the network itself. Their signals are ports. The single
// shared output port carrying a priority side-band, and the two input units
// for the two priorities, are this design's arrangement.
module msg_subsystem
  import msg_pkg::*;
#(
  parameter int unsigned GTLB_ENTRIES = 4,
  parameter int unsigned IN_DEPTH     = 32,
  parameter int unsigned OMBC_W       = 16
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  node_t                            my_node,
  // processor access to MC registers
  input  logic                             mc_wr_en,
  input  logic                             mc_wr_bank,
  input  logic [$clog2(MC_REGS)-1:0]       mc_wr_idx,
  input  word_t                            mc_wr_data,
  input  logic                             mc_inv_en,
  input  logic                             mc_inv_bank,
  input  logic [$clog2(MC_REGS)-1:0]       mc_inv_idx,
  input  logic                             mc_rd_bank,
  input  logic [$clog2(MC_REGS)-1:0]       mc_rd_idx,
  output word_t                            mc_rd_data,
  output logic                             mc_rd_present,
  // condition codes
  input  logic                             cc_wr_en,
  input  logic [CC_W-1:0]                  cc_wr_idx,
  input  logic                             cc_wr_val,
  output logic [NUM_CC-1:0]                cc_val,
  output logic [NUM_CC-1:0]                cc_present,
  // SEND from the issue stage
  input  logic                             send_valid,
  input  send_req_t                        send,
  output logic                             send_ok,
  output logic                             send_stall,
  output logic                             send_fault,
  output logic                             stall_regs,
  output logic                             stall_throttle,
  output logic                             stall_busy,
  // GTLB fill and miss trap
  input  logic                             gtlb_fill_en,
  input  logic [$clog2(GTLB_ENTRIES)-1:0]  gtlb_fill_idx,
  input  gtlb_entry_t                      gtlb_fill_entry,
  output logic                             gtlb_miss,
  // OMBC
  input  logic                             ombc_set_en,
  input  logic [OMBC_W-1:0]                ombc_set_val,
  input  logic                             ombc_inc,
  input  logic                             ombc_dec,
  output logic [OMBC_W-1:0]                ombc_count,
  output logic                             ombc_zero_event,
  // network output
  output logic                             out_valid,
  input  logic                             out_ready,
  output word_t                            out_word,
  output logic                             out_head,
  output logic                             out_tail,
  output node_t                            out_node,
  output logic                             out_prio,
  // network input, one per priority
  input  logic [1:0]                       in_valid,
  output logic [1:0]                       in_ready,
  input  word_t [1:0]                      in_word,
  input  logic [1:0]                       in_head,
  // message threads, one per priority
  input  logic [1:0]                       rd_head,
  input  logic [1:0]                       rd_body,
  output logic [1:0]                       head_present,
  output word_t [1:0]                      head_data,
  output logic [1:0]                       body_present,
  output word_t [1:0]                      body_data,
  output logic [1:0]                       body_err,
  output logic [1:0]                       mesg_arrived,
  output logic [1:0]                       in_flushing,
  output logic [1:0]                       in_full,
  output logic                             out_idle
);

  logic [MC_BANKS-1:0][MC_REGS-1:0] present;
  logic                  rd1_en, rd1_bank;
  logic [$clog2(MC_REGS)-1:0] rd1_idx;
  word_t                 rd1_data;
  logic                  ncc_clr_en, ncc_set_en, ncc_set_val;
  logic [CC_W-1:0]       ncc_clr_idx, ncc_set_idx;
  logic                  req, grant;
  logic                  gtlb_lookup_en, gtlb_hit;
  logic [ADDR_W-1:0]     gtlb_vaddr;
  node_t                 gtlb_node;
  logic                  hw_dec, ombc_zero;

  mc_regfile u_regs (
    .clk, .rst_n,
    .wr_en(mc_wr_en), .wr_bank(mc_wr_bank), .wr_idx(mc_wr_idx), .wr_data(mc_wr_data),
    .inv_en(mc_inv_en), .inv_bank(mc_inv_bank), .inv_idx(mc_inv_idx),
    .rd0_bank(mc_rd_bank), .rd0_idx(mc_rd_idx), .rd0_data(mc_rd_data), .rd0_present(mc_rd_present),
    .rd1_en, .rd1_bank, .rd1_idx, .rd1_data,
    .present,
    .cc_wr_en, .cc_wr_idx, .cc_wr_val,
    .ncc_clr_en, .ncc_clr_idx, .ncc_set_en, .ncc_set_idx, .ncc_set_val,
    .cc_val, .cc_present
  );

  send_validation u_sv (
    .send_valid, .send, .present, .grant, .ombc_zero,
    .req, .ok(send_ok), .stall(send_stall), .fault(send_fault),
    .stall_regs, .stall_throttle, .stall_busy
  );

  gtlb #(.ENTRIES(GTLB_ENTRIES)) u_gtlb (
    .clk, .rst_n,
    .fill_en(gtlb_fill_en), .fill_idx(gtlb_fill_idx), .fill_entry(gtlb_fill_entry),
    .lookup_en(gtlb_lookup_en), .vaddr(gtlb_vaddr),
    .hit(gtlb_hit), .miss(gtlb_miss), .node(gtlb_node)
  );

  net_out_ctrl u_out (
    .clk, .rst_n, .my_node,
    .req, .send, .grant,
    .gtlb_lookup_en, .gtlb_vaddr, .gtlb_hit, .gtlb_node,
    .rd1_en, .rd1_bank, .rd1_idx, .rd1_data,
    .ncc_clr_en, .ncc_clr_idx, .ncc_set_en, .ncc_set_idx, .ncc_set_val,
    .ombc_dec(hw_dec),
    .out_valid, .out_ready, .out_word, .out_head, .out_tail, .out_node, .out_prio,
    .aborted(), .idle(out_idle)
  );

  ombc #(.W(OMBC_W)) u_ombc (
    .clk, .rst_n,
    .set_en(ombc_set_en), .set_val(ombc_set_val),
    .sw_inc(ombc_inc), .sw_dec(ombc_dec), .hw_dec,
    .count(ombc_count), .zero(ombc_zero), .zero_event(ombc_zero_event)
  );

  for (genvar p = 0; p < 2; p++) begin : g_in
    net_in_unit #(.DEPTH(IN_DEPTH)) u_in (
      .clk, .rst_n,
      .in_valid(in_valid[p]), .in_ready(in_ready[p]), .in_word(in_word[p]), .in_head(in_head[p]),
      .rd_head(rd_head[p]), .rd_body(rd_body[p]),
      .head_present(head_present[p]), .head_data(head_data[p]),
      .body_present(body_present[p]), .body_data(body_data[p]), .body_err(body_err[p]),
      .mesg_arrived(mesg_arrived[p]), .flushing(in_flushing[p]), .full(in_full[p])
    );
  end

endmodule
