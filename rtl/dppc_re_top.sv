// dppc_re_top: distributed parallel packet classification with range
// encoding (DPPC-RE), the controller that sits between a network processor
// and K TCAM chips.
//
// Rules are split into Key-ID groups and spread over the K TCAMs; every
// TCAM also holds a copy of the two small port range tables. A five-tuple
// therefore needs a key encoding (two range lookups, in any TCAM) and then
// one two-slot rule-matching search in the TCAM that owns its Key-ID group.
//
// Data flow (per packet):
//   distributor -> RM FIFO of the RM TCAM, KE FIFO of the KE TCAM
//   PU of the KE TCAM  -> two range lookups, tag into its Tag FIFO
//   mapper -> codes into the key buffer of the RM TCAM (CAMID, S/N of tag)
//   PU of the RM TCAM  -> when the key of its RM FIFO head is valid and the
//                         turn allows, a two-slot rule search
//   mapper -> result and tag to the network processor on npu_res[RM TCAM]
// Results of one TCAM come back in the order its packets arrived, so
// packets of one flow (same five-tuple, hence same Key-ID) stay in order.
//
// Interface: one five-tuple per cycle on in_valid/in_tuple, dropped with
// in_drop when a target queue is full; ke_mode selects full adaptation or
// stagger round robin for the KE tasks; tbl_* rewrites the Key-ID -> TCAM
// map. tcam_cmd[k]/tcam_res[k] connect to TCAM k and its SRAM (the TCAM
// chips are external parts). npu_res[k] carries the results of the packets
// whose rules sit in TCAM k.
//
// Queue depths (RM FIFO 8, key buffer 8, KE FIFO 4), the round-robin ratio
// 3, K = 5 and the Key-ID bits follow the classic configuration; the Tag
// FIFO depth of 4 is this design's choice and must cover the TCAM's result
// latency in turns (a full Tag FIFO only delays the next turn).
module dppc_re_top
  import dppc_pkg::*;
#(
  parameter int unsigned K         = 5,
  parameter int unsigned P         = 4,
  parameter int unsigned RM_DEPTH  = 8,
  parameter int unsigned KE_DEPTH  = 4,
  parameter int unsigned TAG_DEPTH = 4,
  parameter int unsigned RRR       = 3,
  parameter logic [7*P-1:0] ID_POS = {7'd100, 7'd51, 7'd71, 7'd3},
  parameter logic [CAMID_W*(2**P)-1:0] ID_MAP = {
    3'd3, 3'd3, 3'd4, 3'd3, 3'd1, 3'd3, 3'd4, 3'd2,
    3'd2, 3'd5, 3'd5, 3'd2, 3'd4, 3'd1, 3'd5, 3'd1}
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // network processor side
  input  logic                 in_valid,
  input  five_tuple_t          in_tuple,
  output logic                 in_drop,
  output npu_res_t             npu_res  [K],
  // configuration
  input  ke_mode_e             ke_mode,
  input  logic                 tbl_we,
  input  logic [P-1:0]         tbl_addr,
  input  logic [CAMID_W-1:0]   tbl_camid,
  // TCAM chips
  output tcam_cmd_t            tcam_cmd [K],
  input  tcam_res_t            tcam_res [K]
);

  localparam int unsigned KCW = $clog2(KE_DEPTH + 1);

  // distributor <-> queues
  logic [K-1:0]     rm_push, ke_push, rm_full, ke_full;
  rm_entry_t        rm_din;
  ke_entry_t        ke_din;
  logic [KCW-1:0]   ke_count [K];
  logic [P-1:0]     key_id;
  logic [$clog2(K)-1:0] rm_sel, ke_sel;

  // queues <-> PUs
  logic [K-1:0]     rm_empty, ke_empty, rm_pop, ke_pop;
  rm_entry_t        rm_head [K];
  ke_entry_t        ke_head [K];
  logic [K-1:0]     tag_push, tag_pop, tag_full, tag_empty;
  tag_t             tag_din [K];
  tag_t             tag_head [K];

  // key buffers
  logic [SN_W-1:0]  kb_rd_addr [K];
  kb_entry_t        kb_rd_data [K];
  logic [K-1:0]     kb_clr;
  logic [K-1:0]     kb_we [K];
  logic [SN_W-1:0]  kb_waddr [K];
  logic [CODE_W-1:0] kb_wspk [K];
  logic [CODE_W-1:0] kb_wdpk [K];

  logic [K-1:0]     ke_prio, rm_blocked;

  distributor #(
    .K(K), .P(P), .RM_DEPTH(RM_DEPTH), .KE_DEPTH(KE_DEPTH),
    .ID_POS(ID_POS), .ID_MAP(ID_MAP)
  ) u_dist (
    .clk, .rst_n,
    .in_valid, .in_tuple, .in_drop,
    .ke_mode, .tbl_we, .tbl_addr, .tbl_camid,
    .rm_full, .ke_full, .ke_count,
    .rm_push, .rm_data(rm_din), .ke_push, .ke_data(ke_din),
    .key_id, .rm_sel, .ke_sel
  );

  for (genvar k = 0; k < int'(K); k++) begin : g_cam
    sync_fifo #(.T(rm_entry_t), .DEPTH(RM_DEPTH)) u_rm_fifo (
      .clk, .rst_n,
      .push(rm_push[k]), .din(rm_din), .pop(rm_pop[k]),
      .head(rm_head[k]), .empty(rm_empty[k]), .full(rm_full[k]), .count()
    );

    sync_fifo #(.T(ke_entry_t), .DEPTH(KE_DEPTH)) u_ke_fifo (
      .clk, .rst_n,
      .push(ke_push[k]), .din(ke_din), .pop(ke_pop[k]),
      .head(ke_head[k]), .empty(ke_empty[k]), .full(ke_full[k]), .count(ke_count[k])
    );

    sync_fifo #(.T(tag_t), .DEPTH(TAG_DEPTH)) u_tag_fifo (
      .clk, .rst_n,
      .push(tag_push[k]), .din(tag_din[k]), .pop(tag_pop[k]),
      .head(tag_head[k]), .empty(tag_empty[k]), .full(tag_full[k]), .count()
    );

    key_buffer #(.DEPTH(RM_DEPTH), .NW(K)) u_kb (
      .clk, .rst_n,
      .wr_en(kb_we[k]), .wr_addr(kb_waddr), .wr_spk(kb_wspk), .wr_dpk(kb_wdpk),
      .rd_addr(kb_rd_addr[k]), .rd_data(kb_rd_data[k]), .clr_en(kb_clr[k])
    );

    processing_unit #(.RM_DEPTH(RM_DEPTH), .RRR(RRR)) u_pu (
      .clk, .rst_n,
      .rm_empty(rm_empty[k]), .rm_head(rm_head[k]), .rm_pop(rm_pop[k]),
      .ke_empty(ke_empty[k]), .ke_head(ke_head[k]), .ke_pop(ke_pop[k]),
      .kb_rd_addr(kb_rd_addr[k]), .kb_rd_data(kb_rd_data[k]), .kb_clr(kb_clr[k]),
      .tag_full(tag_full[k]), .tag_push(tag_push[k]), .tag_din(tag_din[k]),
      .tcam_cmd(tcam_cmd[k]),
      .ke_prio(ke_prio[k]), .rm_blocked(rm_blocked[k])
    );
  end

  mapper #(.K(K)) u_map (
    .clk, .rst_n,
    .tcam_res, .tag_head, .tag_empty, .tag_pop,
    .kb_we, .kb_waddr, .kb_wspk, .kb_wdpk,
    .npu_res
  );

endmodule
