// processing_unit: per-TCAM scheduler (PU). It decides, turn by turn, whether
// the TCAM runs a rule-matching (RM) search or a key encoding (KE), and it
// keeps RM searches in arrival order.
//
// A turn is two TCAM accesses: the two 64-bit slots of one RM search, or
// the source-port and then the destination-port range-table search of one
// KE task. A turn may start on any cycle in which no turn is in progress.
//
// Scheduling is an asymmetric weighted round robin: RM has priority for
// RRR turns, then KE has priority for one turn, and so on. The task type
// with priority goes if it is ready, otherwise the other one does, so no
// TCAM cycle is wasted when work is waiting. Only turns actually issued are
// counted.
//
// Ordered processing: the PU keeps a pointer equal to the S/N of the unit
// at the head of the RM FIFO. An RM task is ready only when the key buffer
// unit at that pointer is valid, i.e. the KE results of the head packet
// have returned. When the RM turn starts, the PU pops the RM FIFO, clears
// the key buffer unit and advances the pointer cyclically. The pointer
// starts at 1 because the distributor gives the first packet S/N 1.
//
// Every turn pushes the packet's tag into the Tag FIFO so the mapper can
// route the results; a full Tag FIFO holds the next turn back.
//
// Timing: the first access of a turn is driven combinationally in the cycle
// the turn starts (from the queue heads); the second access is driven from
// a register in the next cycle.
module processing_unit
  import dppc_pkg::*;
#(
  parameter int unsigned RM_DEPTH = 8,
  parameter int unsigned RRR      = 3
) (
  input  logic             clk,
  input  logic             rst_n,
  // RM FIFO
  input  logic             rm_empty,
  input  rm_entry_t        rm_head,
  output logic             rm_pop,
  // KE FIFO
  input  logic             ke_empty,
  input  ke_entry_t        ke_head,
  output logic             ke_pop,
  // key buffer
  output logic [SN_W-1:0]  kb_rd_addr,
  input  kb_entry_t        kb_rd_data,
  output logic             kb_clr,
  // Tag FIFO
  input  logic             tag_full,
  output logic             tag_push,
  output tag_t             tag_din,
  // TCAM
  output tcam_cmd_t        tcam_cmd,
  // observation
  output logic             ke_prio,
  output logic             rm_blocked
);

  localparam int unsigned TW = $clog2(RRR + 2);

  logic              busy;          // second access of a turn pending
  tcam_op_e          op2;
  logic [SLOT_W-1:0] key2;
  logic [SN_W-1:0]   ptr;
  logic [TW-1:0]     rm_turns;

  logic              rm_ready, ke_ready, issue_rm, issue_ke;
  logic [2*SLOT_W-1:0] skey;

  assign kb_rd_addr = ptr;
  assign rm_ready   = !busy && !rm_empty && kb_rd_data.valid && !tag_full;
  assign ke_ready   = !busy && !ke_empty && !tag_full;
  assign ke_prio    = (int'(rm_turns) >= int'(RRR));
  assign rm_blocked = !rm_empty && !kb_rd_data.valid;

  always_comb begin
    if (ke_prio) begin
      issue_ke = ke_ready;
      issue_rm = !ke_ready && rm_ready;
    end else begin
      issue_rm = rm_ready;
      issue_ke = !rm_ready && ke_ready;
    end
  end

  assign skey     = rm_search_key(rm_head, kb_rd_data.spk, kb_rd_data.dpk);
  assign rm_pop   = issue_rm;
  assign kb_clr   = issue_rm;
  assign ke_pop   = issue_ke;
  assign tag_push = issue_rm || issue_ke;
  assign tag_din  = issue_rm ? rm_head.tag : ke_head.tag;

  always_comb begin
    tcam_cmd = '{valid: 1'b0, op: OP_RM1, key: '0};
    if (busy) begin
      tcam_cmd = '{valid: 1'b1, op: op2, key: key2};
    end else if (issue_rm) begin
      tcam_cmd = '{valid: 1'b1, op: OP_RM1, key: skey[2*SLOT_W-1:SLOT_W]};
    end else if (issue_ke) begin
      tcam_cmd = '{valid: 1'b1, op: OP_KE_SP, key: SLOT_W'(ke_head.sport)};
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      op2      <= OP_RM2;
      key2     <= '0;
      ptr      <= SN_W'(1 % RM_DEPTH);
      rm_turns <= '0;
    end else begin
      busy <= issue_rm || issue_ke;
      if (issue_rm) begin
        op2  <= OP_RM2;
        key2 <= skey[SLOT_W-1:0];
        ptr  <= (int'(ptr) == int'(RM_DEPTH) - 1) ? '0 : ptr + 1'b1;
      end else if (issue_ke) begin
        op2  <= OP_KE_DP;
        key2 <= SLOT_W'(ke_head.dport);
      end
      if (issue_rm || issue_ke)
        rm_turns <= ke_prio ? '0 : rm_turns + 1'b1;
    end
  end

  // The pointer always names the head packet of the RM FIFO.
  a_ptr_head: assert property (@(posedge clk) disable iff (!rst_n)
                               issue_rm |-> (rm_head.tag.sn == ptr));

endmodule
