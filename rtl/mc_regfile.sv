// mc_regfile: the Message Composition (MC) registers and the condition-code
// registers that the message subsystem shares with the processor.
//
// The MC registers are ordinary general registers that double as the compose
// buffer of the network output: two banks, each of 10 user registers plus 2
// registers reserved for system threads. Every register carries a presence
// bit. The processor clears a presence bit when an instruction that will
// write the register issues (inv_*) and sets it again when the result is
// written (wr_*). The network interface never touches MC presence bits.
//
// Ports:
//   wr_*   processor write port; the write also marks the register present
//   inv_*  processor invalidate port; marks a register not present
//   rd0_*  processor read port #0, combinational
//   rd1_*  read port #1 used by the network output controller; the data
//          appears on rd1_data the cycle after rd1_en and is held until the
//          next rd1_en
//   present  all presence bits, for SEND validation
//   cc_*   condition-code registers. The processor may write one (cc_wr_*);
//          the network output controller marks the SEND's ccreg not present
//          when its SEND issues (ncc_clr_*) and writes TRUE and present when
//          the last MC word has been read, or FALSE and present when the
//          SEND is aborted (ncc_set_*).
//
// Reset clears every register to zero and marks it present, and clears every
// CC register to FALSE and present. The bank and register counts follow the
// original architecture; the number of CC registers, the reset state and the timing of
// the read ports are this design's choice.
module mc_regfile
  import msg_pkg::*;
#(
  parameter int unsigned BANKS = MC_BANKS,
  parameter int unsigned REGS  = MC_REGS,
  parameter int unsigned NCC   = NUM_CC
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // processor write / invalidate
  input  logic                     wr_en,
  input  logic [$clog2(BANKS)-1:0] wr_bank,
  input  logic [$clog2(REGS)-1:0]  wr_idx,
  input  word_t                    wr_data,
  input  logic                     inv_en,
  input  logic [$clog2(BANKS)-1:0] inv_bank,
  input  logic [$clog2(REGS)-1:0]  inv_idx,
  // read port #0 (processor)
  input  logic [$clog2(BANKS)-1:0] rd0_bank,
  input  logic [$clog2(REGS)-1:0]  rd0_idx,
  output word_t                    rd0_data,
  output logic                     rd0_present,
  // read port #1 (network output)
  input  logic                     rd1_en,
  input  logic [$clog2(BANKS)-1:0] rd1_bank,
  input  logic [$clog2(REGS)-1:0]  rd1_idx,
  output word_t                    rd1_data,
  // presence bits
  output logic [BANKS-1:0][REGS-1:0] present,
  // condition codes
  input  logic                     cc_wr_en,
  input  logic [$clog2(NCC)-1:0]   cc_wr_idx,
  input  logic                     cc_wr_val,
  input  logic                     ncc_clr_en,
  input  logic [$clog2(NCC)-1:0]   ncc_clr_idx,
  input  logic                     ncc_set_en,
  input  logic [$clog2(NCC)-1:0]   ncc_set_idx,
  input  logic                     ncc_set_val,
  output logic [NCC-1:0]           cc_val,
  output logic [NCC-1:0]           cc_present
);

  word_t regs_q [BANKS][REGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int b = 0; b < BANKS; b++)
        for (int r = 0; r < REGS; r++)
          regs_q[b][r] <= '0;
      present <= '1;
    end else begin
      if (inv_en)
        present[inv_bank][inv_idx] <= 1'b0;
      if (wr_en) begin
        regs_q[wr_bank][wr_idx]  <= wr_data;
        present[wr_bank][wr_idx] <= 1'b1;
      end
    end
  end

  assign rd0_data    = regs_q[rd0_bank][rd0_idx];
  assign rd0_present = present[rd0_bank][rd0_idx];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      rd1_data <= '0;
    else if (rd1_en)
      rd1_data <= regs_q[rd1_bank][rd1_idx];
  end

  // Condition codes. The controller's set and clear come last so that they
  // win over a processor write to the same register in the same cycle.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cc_val     <= '0;
      cc_present <= '1;
    end else begin
      if (cc_wr_en) begin
        cc_val[cc_wr_idx]     <= cc_wr_val;
        cc_present[cc_wr_idx] <= 1'b1;
      end
      if (ncc_clr_en)
        cc_present[ncc_clr_idx] <= 1'b0;
      if (ncc_set_en) begin
        cc_val[ncc_set_idx]     <= ncc_set_val;
        cc_present[ncc_set_idx] <= 1'b1;
      end
    end
  end

endmodule
