// distributor: front end of the classifier. It splits every incoming
// five-tuple into a rule-matching (RM) task and a key-encoding (KE) task
// and dispatches them to the per-TCAM queues.
//
// For each five-tuple presented with in_valid it
//   1. extracts the P-bit Key-ID from fixed bit positions of the tuple
//      (ID_POS; by default PROT(5), DIP(1), DIP(21) and SIP(4), with PROT(5)
//      as the least significant Key-ID bit),
//   2. looks the Key-ID up in the distributed-table map (Key-ID -> TCAM
//      number, 1-based), whose reset contents are the five-TCAM table
//      produced by the capacity-first construction (ID_MAP) and which can be
//      rewritten through the tbl_* port,
//   3. advances that TCAM's S/N counter by one, modulo the RM FIFO depth,
//      and forms the tag {CAMID, S/N} from the new value,
//   4. picks the TCAM that will do the KE task: with full adaptation (FA)
//      the one whose KE FIFO holds the fewest units (lowest number on a
//      tie); with stagger round robin (SRR) the next of the other K-1
//      TCAMs in a round-robin order kept separately for each RM TCAM,
//   5. pushes the tuple and tag into the RM FIFO of the RM TCAM and the two
//      ports and tag into the KE FIFO of the KE TCAM.
// If either target queue is full, or the map names no valid TCAM, the
// tuple is dropped: in_drop is raised in the same cycle and no counter or
// round-robin state moves. The drop policy is this design's choice.
//
// Timing: fully combinational from in_valid to the push strobes; the
// queues register the units at the same clock edge. One tuple per cycle.
module distributor
  import dppc_pkg::*;
#(
  parameter int unsigned K        = 5,
  parameter int unsigned P        = 4,
  parameter int unsigned RM_DEPTH = 8,
  parameter int unsigned KE_DEPTH = 4,
  // bit index into the 104-bit five-tuple of each Key-ID bit, bit 0 first
  parameter logic [7*P-1:0] ID_POS = {7'd100, 7'd51, 7'd71, 7'd3},
  // TCAM number (1..K) of each Key-ID group, Key-ID 0 in the low bits
  parameter logic [CAMID_W*(2**P)-1:0] ID_MAP = {
    3'd3, 3'd3, 3'd4, 3'd3, 3'd1, 3'd3, 3'd4, 3'd2,
    3'd2, 3'd5, 3'd5, 3'd2, 3'd4, 3'd1, 3'd5, 3'd1}
) (
  input  logic                              clk,
  input  logic                              rst_n,
  // from the network processor
  input  logic                              in_valid,
  input  five_tuple_t                       in_tuple,
  output logic                              in_drop,
  // configuration
  input  ke_mode_e                          ke_mode,
  input  logic                              tbl_we,
  input  logic [P-1:0]                      tbl_addr,
  input  logic [CAMID_W-1:0]                tbl_camid,
  // queue status
  input  logic [K-1:0]                      rm_full,
  input  logic [K-1:0]                      ke_full,
  input  logic [$clog2(KE_DEPTH+1)-1:0]     ke_count [K],
  // queue pushes
  output logic [K-1:0]                      rm_push,
  output rm_entry_t                         rm_data,
  output logic [K-1:0]                      ke_push,
  output ke_entry_t                         ke_data,
  // observation
  output logic [P-1:0]                      key_id,
  output logic [$clog2(K)-1:0]              rm_sel,
  output logic [$clog2(K)-1:0]              ke_sel
);

  localparam int unsigned KW = $clog2(K);
  localparam int unsigned CW = $clog2(KE_DEPTH + 1);

  logic [CAMID_W-1:0] id_map [2**P];
  logic [SN_W-1:0]    sn_cnt [K];
  logic [KW-1:0]      rr_off [K];

  logic [103:0]       tuple_bits;
  logic [CAMID_W-1:0] camid;
  logic               camid_ok;
  logic [KW-1:0]      fa_sel, srr_sel;
  logic [SN_W-1:0]    sn_new;
  logic               accept;

  // ---- Key-ID extraction and map lookup ----
  always_comb begin
    tuple_bits = in_tuple;
    for (int b = 0; b < int'(P); b++) key_id[b] = tuple_bits[ID_POS[7*b +: 7]];
  end

  assign camid    = id_map[key_id];
  assign camid_ok = (camid != '0) && (int'(camid) <= int'(K));
  assign rm_sel   = camid_ok ? KW'(camid - 1'b1) : '0;

  // ---- KE TCAM choice ----
  always_comb begin
    logic [CW-1:0] best;
    fa_sel = '0;
    best   = ke_count[0];
    for (int k = 1; k < int'(K); k++) begin
      if (ke_count[k] < best) begin
        best   = ke_count[k];
        fa_sel = KW'(k);
      end
    end
  end

  always_comb begin
    int unsigned t;
    t       = (int'(rm_sel) + 1 + int'(rr_off[rm_sel])) % K;
    srr_sel = KW'(t);
  end

  assign ke_sel = (ke_mode == KE_SRR) ? srr_sel : fa_sel;

  // ---- tag and pushes ----
  assign sn_new  = (int'(sn_cnt[rm_sel]) == int'(RM_DEPTH) - 1) ? '0 : sn_cnt[rm_sel] + 1'b1;
  assign accept  = in_valid && camid_ok && !rm_full[rm_sel] && !ke_full[ke_sel];
  assign in_drop = in_valid && !accept;

  always_comb begin
    rm_push = '0;
    ke_push = '0;
    if (accept) begin
      rm_push[rm_sel] = 1'b1;
      ke_push[ke_sel] = 1'b1;
    end
  end

  assign rm_data = '{prot: in_tuple.prot, dip: in_tuple.dip, sip: in_tuple.sip,
                     dport: in_tuple.dport, sport: in_tuple.sport,
                     tag: '{camid: camid, sn: sn_new}};
  assign ke_data = '{dport: in_tuple.dport, sport: in_tuple.sport,
                     tag: '{camid: camid, sn: sn_new}};

  // ---- state ----
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int j = 0; j < 2**P; j++) id_map[j] <= ID_MAP[CAMID_W*j +: CAMID_W];
      for (int k = 0; k < int'(K); k++) begin
        sn_cnt[k] <= '0;
        rr_off[k] <= '0;
      end
    end else begin
      if (tbl_we) id_map[tbl_addr] <= tbl_camid;
      if (accept) begin
        sn_cnt[rm_sel] <= sn_new;
        if (ke_mode == KE_SRR)
          rr_off[rm_sel] <= (int'(rr_off[rm_sel]) >= int'(K) - 2) ? '0 : rr_off[rm_sel] + 1'b1;
      end
    end
  end

  // SRR never sends the KE task to the packet's own RM TCAM.
  a_srr_other: assert property (@(posedge clk) disable iff (!rst_n)
                                (accept && ke_mode == KE_SRR) |-> (ke_sel != rm_sel));

  initial begin
    assert (K >= 2 && K < 2**CAMID_W) else $error("K must be in 2..7");
    assert (RM_DEPTH <= 2**SN_W) else $error("RM_DEPTH exceeds the S/N range");
  end

endmodule
