// tb_sync_fifo: random push/pop test of the queue used for the RM, KE and
// Tag FIFOs, at the KE FIFO depth (4) and at the RM FIFO depth (8) with the
// RM unit type. Each cycle the head, empty, full and count outputs are
// compared with a reference queue; pushes into a full queue are only made
// together with a pop, as the queue's users guarantee.
module tb_sync_fifo;
  import dppc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  // depth-4 queue of 16-bit words
  logic        push4 = 0, pop4 = 0;
  logic [15:0] din4 = '0, head4;
  logic        empty4, full4;
  logic [2:0]  count4;
  sync_fifo #(.T(logic [15:0]), .DEPTH(4)) u4 (
    .clk, .rst_n, .push(push4), .din(din4), .pop(pop4),
    .head(head4), .empty(empty4), .full(full4), .count(count4));

  // depth-8 queue of RM units
  logic      push8 = 0, pop8 = 0;
  rm_entry_t din8 = '0, head8;
  logic      empty8, full8;
  logic [3:0] count8;
  sync_fifo #(.T(rm_entry_t), .DEPTH(8)) u8 (
    .clk, .rst_n, .push(push8), .din(din8), .pop(pop8),
    .head(head8), .empty(empty8), .full(full8), .count(count8));

  logic [15:0] q4 [$];
  rm_entry_t   q8 [$];
  int checks = 0, failures = 0;
  int n_full4 = 0, n_full8 = 0;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      // compare outputs with the reference
      checks++;
      if (empty4 != (q4.size() == 0) || full4 != (q4.size() == 4) || count4 != 3'(q4.size()) ||
          (q4.size() != 0 && head4 != q4[0])) begin
        failures++;
        $display("FAIL depth4 cycle %0d: size %0d count %0d head %h", i, q4.size(), count4, head4);
      end
      checks++;
      if (empty8 != (q8.size() == 0) || full8 != (q8.size() == 8) || count8 != 4'(q8.size()) ||
          (q8.size() != 0 && head8 != q8[0])) begin
        failures++;
        $display("FAIL depth8 cycle %0d: size %0d count %0d", i, q8.size(), count8);
      end
      if (full4) n_full4++;
      if (full8) n_full8++;
      // next stimulus; bias toward filling in the first half
      pop4  = (q4.size() != 0) && ($urandom_range(0, 99) < ((i < 2000) ? 30 : 60));
      push4 = ($urandom_range(0, 99) < 55) && (q4.size() < 4 || pop4);
      din4  = 16'($urandom());
      pop8  = (q8.size() != 0) && ($urandom_range(0, 99) < ((i < 2000) ? 30 : 60));
      push8 = ($urandom_range(0, 99) < 55) && (q8.size() < 8 || pop8);
      din8  = rm_entry_t'({$urandom(), $urandom(), $urandom(), $urandom()});
      @(posedge clk);
      if (pop4) void'(q4.pop_front());
      if (push4) q4.push_back(din4);
      if (pop8) void'(q8.pop_front());
      if (push8) q8.push_back(din8);
    end
    checks++;
    if (n_full4 == 0 || n_full8 == 0) begin
      failures++;
      $display("FAIL: queues never filled");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
