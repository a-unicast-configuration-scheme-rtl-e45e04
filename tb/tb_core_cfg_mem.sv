// tb_core_cfg_mem -- self-checking test of the 64x8 core configuration
// memory: 64 sequential words after a start, surplus words ignored, and a
// new start rewinding to address 0.
module tb_core_cfg_mem;
  logic clk = 1'b0, rst_n = 1'b0, start = 0, wr = 0;
  logic [7:0] wd = '0;
  logic [7:0] cfg [64];
  logic [7:0] ref_m [64];
  int checks = 0, failures = 0;

  core_cfg_mem #(.DEPTH(64), .W(8)) dut (.clk, .rst_n, .start, .wr, .wd, .cfg);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    for (int a = 0; a < 64; a++) begin
      checks++;
      if (cfg[a] !== ref_m[a]) begin failures++; $display("mem[%0d]=%h exp %h", a, cfg[a], ref_m[a]); end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 4; rep++) begin
      start = 1; @(posedge clk); #1; start = 0;
      for (int a = 0; a < 64; a++) begin
        ref_m[a] = 8'($urandom); wd = ref_m[a]; wr = 1; @(posedge clk); #1;
        // an idle cycle now and then between words
        if ($urandom_range(7) == 0) begin wr = 0; @(posedge clk); #1; end
      end
      wd = 8'($urandom); wr = 1; repeat (3) @(posedge clk); #1; wr = 0;
      check();
    end
    // rewind and rewrite the first 5 words only
    start = 1; @(posedge clk); #1; start = 0;
    for (int a = 0; a < 5; a++) begin
      ref_m[a] = 8'($urandom); wd = ref_m[a]; wr = 1; @(posedge clk); #1;
    end
    wr = 0; @(posedge clk); #1;
    check();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
