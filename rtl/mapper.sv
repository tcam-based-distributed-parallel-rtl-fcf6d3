// mapper: collects the results coming back from the K TCAMs (through their
// associated SRAMs) and sends each one where it belongs.
//
// Each result word says what it is:
//   RM  - a rule-matching result: it is returned to the network processor
//         on npu_res[s] together with the tag at the head of TCAM s's Tag
//         FIFO, which is popped;
//   KE1 - the source-port range code (KE phase I): it is held in a latch
//         for TCAM s until phase II arrives, on the next cycle;
//   KE2 - the destination-port range code (KE phase II): the tag at the head
//         of TCAM s's Tag FIFO is popped; its CAMID names the key buffer and
//         its S/N the unit into which both codes are written, with the
//         valid bit set.
// A RM result pops the Tag FIFO as well because the processing unit pushes
// a tag for every turn; that way the Tag FIFO stays in step with the
// in-order result stream of its TCAM, and the network processor receives
// the tag of each classification.
//
// Key buffer writes leave as a K x K matrix of enables, kb_we[c][s] =
// "source TCAM s writes key buffer c", so every key buffer gets one write
// port per TCAM.
//
// Timing: all outputs are registered, one cycle after the result arrives.
module mapper
  import dppc_pkg::*;
#(
  parameter int unsigned K = 5
) (
  input  logic               clk,
  input  logic               rst_n,
  input  tcam_res_t          tcam_res  [K],
  input  tag_t               tag_head  [K],
  input  logic [K-1:0]       tag_empty,
  output logic [K-1:0]       tag_pop,
  output logic [K-1:0]       kb_we     [K],
  output logic [SN_W-1:0]    kb_waddr  [K],
  output logic [CODE_W-1:0]  kb_wspk   [K],
  output logic [CODE_W-1:0]  kb_wdpk   [K],
  output npu_res_t           npu_res   [K]
);

  logic [CODE_W-1:0] sp_latch   [K];
  logic [K-1:0]      sp_pending;

  always_comb begin
    for (int s = 0; s < int'(K); s++)
      tag_pop[s] = (tcam_res[s].rtype == RES_RM) || (tcam_res[s].rtype == RES_KE2);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sp_pending <= '0;
      for (int s = 0; s < int'(K); s++) begin
        kb_we[s]    <= '0;
        npu_res[s]  <= '0;
        sp_latch[s] <= '0;
        kb_waddr[s] <= '0;
        kb_wspk[s]  <= '0;
        kb_wdpk[s]  <= '0;
      end
    end else begin
      for (int c = 0; c < int'(K); c++) kb_we[c] <= '0;
      for (int s = 0; s < int'(K); s++) begin
        npu_res[s].valid <= 1'b0;
        case (tcam_res[s].rtype)
          RES_KE1: begin
            sp_latch[s]   <= tcam_res[s].data[CODE_W-1:0];
            sp_pending[s] <= 1'b1;
          end
          RES_KE2: begin
            sp_pending[s] <= 1'b0;
            for (int c = 0; c < int'(K); c++)
              if (int'(tag_head[s].camid) == c + 1) kb_we[c][s] <= 1'b1;
            kb_waddr[s] <= tag_head[s].sn;
            kb_wspk[s]  <= sp_latch[s];
            kb_wdpk[s]  <= tcam_res[s].data[CODE_W-1:0];
          end
          RES_RM: begin
            npu_res[s] <= '{valid: 1'b1, tag: tag_head[s],
                            hit: tcam_res[s].hit, data: tcam_res[s].data};
          end
          default: ;
        endcase
      end
    end
  end

  for (genvar s = 0; s < int'(K); s++) begin : g_chk
    // Every RM or KE phase II result has its tag waiting.
    a_tag_avail: assert property (@(posedge clk) disable iff (!rst_n)
                                  tag_pop[s] |-> !tag_empty[s]);
    // Phase II always follows phase I of the same TCAM in the next cycle.
    a_phase_order: assert property (@(posedge clk) disable iff (!rst_n)
                                    (tcam_res[s].rtype == RES_KE1) |=> (tcam_res[s].rtype == RES_KE2));
    a_phase2_has_1: assert property (@(posedge clk) disable iff (!rst_n)
                                     (tcam_res[s].rtype == RES_KE2) |-> sp_pending[s]);
  end

endmodule
