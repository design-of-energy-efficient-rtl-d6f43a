// tb_bsa: random allocate/free traffic against a reference free list.
// Checks that the first free slot is handed out, the free count, and that
// congestion is raised exactly when at most one slot is free.
module tb_bsa;
  localparam int SLOTS = noc_pkg::BUF_SLOTS;
  logic clk = 0, rst_n = 0, alloc_req = 0, dealloc_req = 0, alloc_ok, cong_o;
  logic [3:0] alloc_idx, dealloc_idx;
  logic [3:0] free_cnt;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  bsa #(.SLOTS(SLOTS)) dut (.clk, .rst_n, .alloc_req, .alloc_idx, .alloc_ok,
                            .dealloc_req, .dealloc_idx, .free_cnt, .cong_o);

  bit used [SLOTS];
  initial begin
    #12 rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      int nfree, first, pick;
      @(negedge clk);
      nfree = 0; first = -1;
      for (int s = SLOTS - 1; s >= 0; s--) if (!used[s]) begin nfree++; first = s; end
      checks += 3;
      if (int'(free_cnt) != nfree) begin failures++; $display("FAIL count %0d vs %0d", free_cnt, nfree); end
      if (cong_o != (nfree <= 1)) begin failures++; $display("FAIL cong at %0d free", nfree); end
      if (alloc_ok != (nfree > 0) || (nfree > 0 && int'(alloc_idx) != first)) begin
        failures++; $display("FAIL alloc idx %0d vs %0d", alloc_idx, first);
      end
      alloc_req = (nfree > 0) && ($urandom_range(1) == 1);
      dealloc_req = 0;
      if (nfree < SLOTS && $urandom_range(2) != 0) begin
        do pick = $urandom_range(SLOTS - 1); while (!used[pick]);
        dealloc_req = 1; dealloc_idx = 4'(pick);
      end
      @(posedge clk);
      if (alloc_req) used[first] = 1;
      if (dealloc_req) used[dealloc_idx] = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
