// dppc_pkg: types and constants shared by the distributed parallel packet
// classifier with range encoding (DPPC-RE).
//
// The classifier spreads five-tuple lookups over K TCAM chips. Each packet
// needs one key-encoding (KE) task, which turns its two port numbers into
// short range codes using range tables held in every TCAM, and one
// rule-matching (RM) task in the TCAM that holds the packet's Key-ID group.
//
// Field widths of the queue units follow the classic formats: an 8-bit tag
// made of a 5-bit serial number (S/N) and a 3-bit TCAM number (CAMID), RM
// units of PROT/DIP/SIP/DPORT/SPORT plus tag (112 bits), KE units of
// DPORT/SPORT plus tag (40 bits), key buffer units of valid + two 8-bit
// codes. The TCAM command and result words are this design's own choice: a
// 64-bit slot key with a 2-bit operation, and a result carrying its type
// (RM, KE phase I, KE phase II), a hit flag and 16 bits of SRAM data.
package dppc_pkg;

  localparam int SN_W    = 5;   // serial number width of a tag
  localparam int CAMID_W = 3;   // TCAM number width of a tag (1-based)
  localparam int CODE_W  = 8;   // range code width per port field
  localparam int SLOT_W  = 64;  // TCAM slot width
  localparam int DATA_W  = 16;  // result data word from the associated SRAM

  // Tag: TCAM number in the upper bits, S/N in the lower bits.
  typedef struct packed {
    logic [CAMID_W-1:0] camid;
    logic [SN_W-1:0]    sn;
  } tag_t;

  // Five-tuple search key, 104 bits; SIP bit 1 is the MSB.
  typedef struct packed {
    logic [31:0] sip;
    logic [31:0] dip;
    logic [15:0] sport;
    logic [15:0] dport;
    logic [7:0]  prot;
  } five_tuple_t;

  // RM FIFO unit.
  typedef struct packed {
    logic [7:0]  prot;
    logic [31:0] dip;
    logic [31:0] sip;
    logic [15:0] dport;
    logic [15:0] sport;
    tag_t        tag;
  } rm_entry_t;

  // KE FIFO unit.
  typedef struct packed {
    logic [15:0] dport;
    logic [15:0] sport;
    tag_t        tag;
  } ke_entry_t;

  // Key buffer unit.
  typedef struct packed {
    logic              valid;
    logic [CODE_W-1:0] dpk;
    logic [CODE_W-1:0] spk;
  } kb_entry_t;

  // TCAM lookup operations: the two slots of a rule-matching search, and
  // the source-port and destination-port range table searches.
  typedef enum logic [1:0] {
    OP_RM1   = 2'd0,
    OP_RM2   = 2'd1,
    OP_KE_SP = 2'd2,
    OP_KE_DP = 2'd3
  } tcam_op_e;

  typedef struct packed {
    logic              valid;
    tcam_op_e          op;
    logic [SLOT_W-1:0] key;
  } tcam_cmd_t;

  // Result type, encoded in the result word itself.
  typedef enum logic [1:0] {
    RES_NONE = 2'd0,
    RES_RM   = 2'd1,
    RES_KE1  = 2'd2,   // source port code
    RES_KE2  = 2'd3    // destination port code
  } res_type_e;

  typedef struct packed {
    res_type_e         rtype;
    logic              hit;
    logic [DATA_W-1:0] data;
  } tcam_res_t;

  // Classification result returned to the network processor.
  typedef struct packed {
    logic              valid;
    tag_t              tag;
    logic              hit;
    logic [DATA_W-1:0] data;
  } npu_res_t;

  typedef enum logic {
    KE_FA  = 1'b0,    // full adaptation: least backlogged KE FIFO
    KE_SRR = 1'b1     // stagger round robin over the other TCAMs
  } ke_mode_e;

  // Encoded 128-bit rule-matching key: the five-tuple followed by the 24
  // free bits of the second slot, of which 16 carry the two range codes.
  function automatic logic [2*SLOT_W-1:0] rm_search_key(rm_entry_t e,
                                                        logic [CODE_W-1:0] spk,
                                                        logic [CODE_W-1:0] dpk);
    return {e.sip, e.dip, e.sport, e.dport, e.prot, spk, dpk, 8'h00};
  endfunction

endpackage
