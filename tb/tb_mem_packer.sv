// tb_mem_packer: random address patterns (all equal, all distinct, mixed)
// with random activity masks. The number of packed requests must equal the
// number of distinct addresses among active threads, every active thread
// must be served exactly once by a request carrying its address, and
// inactive threads never. Back-pressure on the output is random.
module tb_mem_packer;
  import drpu_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        in_valid, in_ready, out_valid, out_ready;
  addr_t       in_addr [RAYS];
  logic [3:0]  in_mask, out_mask;
  addr_t       out_addr;
  logic [31:0] requests;
  int checks = 0, failures = 0, n_one = 0, n_four = 0;

  mem_packer dut (.*);

  initial begin
    addr_t a [4];
    logic [3:0] m, served;
    int distinct, got;
    bit dup;
    in_valid = 0; out_ready = 0; in_mask = 0;
    for (int i = 0; i < 4; i++) in_addr[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      for (int i = 0; i < 4; i++) a[i] = 32'($urandom_range(0, 3) == 0 ? $urandom : $urandom_range(100, 102));
      if (n % 7 == 0) for (int i = 0; i < 4; i++) a[i] = 32'd55;
      m = 4'($urandom_range(1, 15));
      distinct = 0;
      for (int i = 0; i < 4; i++) if (m[i]) begin
        dup = 0;
        for (int j = 0; j < i; j++) if (m[j] && a[j] == a[i]) dup = 1;
        if (!dup) distinct++;
      end
      @(negedge clk);
      while (!in_ready) @(negedge clk);
      in_valid = 1; in_mask = m;
      for (int i = 0; i < 4; i++) in_addr[i] = a[i];
      @(negedge clk);
      in_valid = 0;
      served = 0; got = 0;
      while (out_valid) begin
        out_ready = ($urandom_range(0, 2) != 0);
        if (out_ready) begin
          got++;
          for (int i = 0; i < 4; i++) if (out_mask[i]) begin
            checks++;
            if (!m[i] || served[i] || a[i] != out_addr) begin
              failures++; $display("FAIL thread %0d wrongly served", i);
            end
            served[i] = 1;
          end
        end
        @(negedge clk);
        out_ready = 0;
      end
      checks++;
      if (served != m || got != distinct) begin
        failures++;
        $display("FAIL packet %0d served %b mask %b requests %0d distinct %0d", n, served, m, got, distinct);
      end
      if (distinct == 1 && m == 4'hF) n_one++;
      if (distinct == 4) n_four++;
    end
    checks++;
    if (n_one == 0 || n_four == 0) begin failures++; $display("FAIL coverage %0d %0d", n_one, n_four); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
