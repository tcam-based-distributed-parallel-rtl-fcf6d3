// key_buffer: register file, addressed by serial number (S/N), that holds
// the key-encoding results of the packets waiting in one TCAM's RM FIFO.
//
// It has as many units as the RM FIFO has, one per S/N. Each unit holds a
// valid bit and the two 8-bit range codes (destination and source port).
// The mapper writes a unit, and sets its valid bit, when both phases of a
// key encoding have come back; because the KE task of a packet can run on
// any TCAM, up to NW such writes, from different TCAMs, can arrive in one
// cycle, each to a different S/N. The processing unit reads the unit at its
// pointer combinationally and clears its valid bit when it launches the
// rule-matching search.
//
// Timing: a write is visible on rd_data the cycle after its edge. A clear
// and a write to the same unit in one cycle leave the written value valid
// (that cannot happen in the classifier, where a unit is only rewritten
// after it was consumed). Reset clears all valid bits.
module key_buffer
  import dppc_pkg::*;
#(
  parameter int unsigned DEPTH = 8,
  parameter int unsigned NW    = 5
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // write ports (from the mapper)
  input  logic [NW-1:0]           wr_en,
  input  logic [SN_W-1:0]         wr_addr [NW],
  input  logic [CODE_W-1:0]       wr_spk  [NW],
  input  logic [CODE_W-1:0]       wr_dpk  [NW],
  // read / clear port (from the processing unit)
  input  logic [SN_W-1:0]         rd_addr,
  output kb_entry_t               rd_data,
  input  logic                    clr_en
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [DEPTH-1:0]  valid;
  logic [CODE_W-1:0] spk [DEPTH];
  logic [CODE_W-1:0] dpk [DEPTH];

  assign rd_data = '{valid: valid[AW'(rd_addr)], dpk: dpk[AW'(rd_addr)], spk: spk[AW'(rd_addr)]};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      valid <= '0;
    end else begin
      if (clr_en) valid[AW'(rd_addr)] <= 1'b0;
      for (int w = 0; w < int'(NW); w++) begin
        if (wr_en[w]) valid[AW'(wr_addr[w])] <= 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    for (int w = 0; w < int'(NW); w++) begin
      if (wr_en[w]) begin
        spk[AW'(wr_addr[w])] <= wr_spk[w];
        dpk[AW'(wr_addr[w])] <= wr_dpk[w];
      end
    end
  end

  // An encoding result must land in a free unit, and only one writer may
  // target a given unit in a cycle.
  for (genvar w = 0; w < int'(NW); w++) begin : g_chk
    a_write_free: assert property (@(posedge clk) disable iff (!rst_n)
                                   wr_en[w] |-> !valid[AW'(wr_addr[w])]);
    a_addr_range: assert property (@(posedge clk) disable iff (!rst_n)
                                   wr_en[w] |-> (wr_addr[w] < SN_W'(DEPTH)));
  end

endmodule
