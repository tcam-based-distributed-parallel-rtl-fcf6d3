// tb_distributor: checks the distributor at five TCAMs against its own
// reference: Key-ID bits taken from SIP(4), DIP(21), DIP(1), PROT(5), the
// five-TCAM Key-ID map, per-TCAM S/N counters modulo 8, full adaptation
// (fewest KE units, lowest number on a tie), stagger round robin (the other
// four TCAMs in turn, per RM TCAM), drops on a full queue without any state
// change, and rewriting of the map. It starts with the worked example
// packet, whose KE task must go to TCAM 2 when the KE FIFOs hold 2,0,1,1,1.
module tb_distributor;
  import dppc_pkg::*;

  localparam int K = 5;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         in_valid = 1'b0;
  five_tuple_t  in_tuple = '0;
  logic         in_drop;
  ke_mode_e     ke_mode = KE_FA;
  logic         tbl_we = 1'b0;
  logic [3:0]   tbl_addr = '0;
  logic [2:0]   tbl_camid = '0;
  logic [K-1:0] rm_full = '0, ke_full = '0;
  logic [2:0]   ke_count [K];
  logic [K-1:0] rm_push, ke_push;
  rm_entry_t    rm_data;
  ke_entry_t    ke_data;
  logic [3:0]   key_id;
  logic [2:0]   rm_sel, ke_sel;

  distributor dut (.*);

  int map [16] = '{1, 5, 1, 4, 2, 5, 5, 2, 2, 4, 3, 1, 3, 4, 3, 3};
  int sn [K];
  int rr [K];
  int checks = 0, failures = 0;
  int n_drop = 0, n_fa = 0, n_srr = 0;

  function automatic logic [3:0] kid(five_tuple_t t);
    return {t.sip[28], t.dip[11], t.dip[31], t.prot[3]};
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Present one tuple and compare everything with the reference model.
  task automatic one(five_tuple_t t);
    int c, exp_ke, best; bit exp_drop; logic [4:0] exp_sn;
    @(negedge clk);
    in_valid = 1'b1; in_tuple = t;
    #1;
    c = map[kid(t)];
    if (ke_mode == KE_FA) begin
      exp_ke = 0; best = ke_count[0];
      for (int k = 1; k < K; k++) if (ke_count[k] < best) begin best = ke_count[k]; exp_ke = k; end
    end else begin
      exp_ke = (c - 1 + 1 + rr[c-1]) % K;
    end
    exp_drop = (c < 1 || c > K) || rm_full[c-1] || ke_full[exp_ke];
    exp_sn = 5'((sn[c-1] + 1) % 8);
    check(key_id == kid(t), $sformatf("key id %b want %b", key_id, kid(t)));
    check(in_drop == exp_drop, $sformatf("drop %0d want %0d", in_drop, exp_drop));
    if (!exp_drop) begin
      check(rm_push == K'(1) << (c - 1), $sformatf("rm_push %b want TCAM %0d", rm_push, c));
      check(ke_push == K'(1) << exp_ke, $sformatf("ke_push %b want TCAM %0d", ke_push, exp_ke + 1));
      check(rm_data.tag == {3'(c), exp_sn} && ke_data.tag == {3'(c), exp_sn},
            $sformatf("tag %b want %0d/%0d", rm_data.tag, c, exp_sn));
      check(rm_data.sip == t.sip && rm_data.dip == t.dip && rm_data.prot == t.prot &&
            rm_data.sport == t.sport && rm_data.dport == t.dport &&
            ke_data.sport == t.sport && ke_data.dport == t.dport, "unit fields");
      if (exp_ke != c - 1) begin
        if (ke_mode == KE_FA) n_fa++; else n_srr++;
      end
    end else begin
      check(rm_push == 0 && ke_push == 0, "push on a drop");
      n_drop++;
    end
    @(posedge clk);
    if (!exp_drop) begin
      sn[c-1] = (sn[c-1] + 1) % 8;
      if (ke_mode == KE_SRR) rr[c-1] = (rr[c-1] + 1) % (K - 1);
    end
    #1;
    in_valid = 1'b0;
  endtask

  function automatic five_tuple_t rnd();
    return five_tuple_t'({$urandom(), $urandom(), $urandom(), 8'($urandom())});
  endfunction

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    five_tuple_t p0;
    for (int k = 0; k < K; k++) begin sn[k] = 0; rr[k] = 0; ke_count[k] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // worked example
    p0 = '{sip: {8'd166, 8'd111, 8'd140, 8'd1}, dip: {8'd202, 8'd205, 8'd4, 8'd3},
           sport: 16'd15335, dport: 16'd80, prot: 8'd6};
    ke_count = '{3'd2, 3'd0, 3'd1, 3'd1, 3'd1};
    @(negedge clk);
    in_valid = 1'b1; in_tuple = p0;
    #1;
    check(key_id == 4'b0010, "example Key-ID");
    check(rm_push == 5'b00001 && ke_push == 5'b00010, "example RM TCAM 1, KE TCAM 2");
    check(rm_data.tag == 8'b001_00001, "example tag");
    @(posedge clk); sn[0] = 1;
    #1 in_valid = 1'b0;

    // full adaptation with random backlog, some full queues
    ke_mode = KE_FA;
    for (int i = 0; i < 600; i++) begin
      for (int k = 0; k < K; k++) ke_count[k] = 3'($urandom_range(0, 4));
      for (int k = 0; k < K; k++) ke_full[k] = (ke_count[k] == 4);
      rm_full = ($urandom_range(0, 9) == 0) ? K'($urandom()) : '0;
      one(rnd());
    end
    // stagger round robin
    ke_mode = KE_SRR;
    for (int i = 0; i < 600; i++) begin
      ke_full = ($urandom_range(0, 9) == 0) ? K'($urandom()) : '0;
      rm_full = ($urandom_range(0, 9) == 0) ? K'($urandom()) : '0;
      one(rnd());
    end
    // map rewrite: move Key-ID group 2 to TCAM 3, mark group 5 unused
    ke_full = '0; rm_full = '0;
    @(negedge clk);
    tbl_we = 1'b1; tbl_addr = 4'd2; tbl_camid = 3'd3;
    @(negedge clk);
    tbl_addr = 4'd5; tbl_camid = 3'd0;
    @(negedge clk);
    tbl_we = 1'b0;
    map[2] = 3; map[5] = 0;
    for (int i = 0; i < 300; i++) begin
      five_tuple_t t; t = rnd();
      if (kid(t) == 5) begin
        @(negedge clk);
        in_valid = 1'b1; in_tuple = t; #1;
        check(in_drop && rm_push == 0, "unmapped Key-ID must drop");
        @(posedge clk); #1; in_valid = 1'b0;
      end else one(t);
    end
    p0.sport = 16'd1;
    one(p0);
    check(n_drop > 0 && n_fa > 0 && n_srr > 0, "drops, FA and SRR all seen");
    $display("drops %0d FA-other %0d SRR-other %0d", n_drop, n_fa, n_srr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
