// tb_key_buffer: random test of the S/N-addressed key buffer with eight
// units and five write ports. Each cycle up to five writers store codes into
// distinct free units, and the reader either inspects a unit or clears it.
// The read data of every cycle is compared with a reference array.
module tb_key_buffer;
  import dppc_pkg::*;

  localparam int DEPTH = 8, NW = 5;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NW-1:0]     wr_en = '0;
  logic [SN_W-1:0]   wr_addr [NW];
  logic [CODE_W-1:0] wr_spk [NW], wr_dpk [NW];
  logic [SN_W-1:0]   rd_addr = '0;
  kb_entry_t         rd_data;
  logic              clr_en = 1'b0;

  key_buffer #(.DEPTH(DEPTH), .NW(NW)) dut (.*);

  bit          ref_v [DEPTH];
  logic [7:0]  ref_s [DEPTH], ref_d [DEPTH];
  int checks = 0, failures = 0, n_multi = 0;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int w = 0; w < NW; w++) begin wr_addr[w] = '0; wr_spk[w] = '0; wr_dpk[w] = '0; end
    for (int a = 0; a < DEPTH; a++) ref_v[a] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      bit taken [DEPTH];
      int nw;
      @(negedge clk);
      // check the unit currently addressed
      checks++;
      if (rd_data.valid != ref_v[rd_addr] ||
          (ref_v[rd_addr] && (rd_data.spk != ref_s[rd_addr] || rd_data.dpk != ref_d[rd_addr]))) begin
        failures++;
        $display("FAIL cycle %0d addr %0d: got %b/%h/%h want %0d/%h/%h", i, rd_addr,
                 rd_data.valid, rd_data.spk, rd_data.dpk, ref_v[rd_addr], ref_s[rd_addr], ref_d[rd_addr]);
      end
      // next stimulus
      clr_en = ref_v[rd_addr] && ($urandom_range(0, 1) == 1);
      for (int a = 0; a < DEPTH; a++) taken[a] = ref_v[a] || (clr_en && a == int'(rd_addr));
      nw = 0;
      for (int w = 0; w < NW; w++) begin
        int a; a = $urandom_range(0, DEPTH - 1);
        wr_en[w] = 1'b0;
        if (!taken[a] && $urandom_range(0, 2) == 0) begin
          wr_en[w] = 1'b1; wr_addr[w] = 5'(a);
          wr_spk[w] = 8'($urandom()); wr_dpk[w] = 8'($urandom());
          taken[a] = 1; nw++;
        end
      end
      if (nw > 1) n_multi++;
      @(posedge clk);
      if (clr_en) ref_v[rd_addr] = 0;
      for (int w = 0; w < NW; w++)
        if (wr_en[w]) begin
          ref_v[wr_addr[w]] = 1; ref_s[wr_addr[w]] = wr_spk[w]; ref_d[wr_addr[w]] = wr_dpk[w];
        end
      #1;
      rd_addr = 5'($urandom_range(0, DEPTH - 1));
    end
    checks++;
    if (n_multi == 0) begin failures++; $display("FAIL: never several writes in a cycle"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
