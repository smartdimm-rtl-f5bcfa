// Unit test of the Config Memory: random writes on both write ports
// (including same-address collisions, where port 1 must win) and random
// reads on all three read ports, checked one cycle later against a
// reference array. Only written lines are read (two-state simulation).
module tb_config_memory;
  import smartdimm_pkg::*;
  localparam int P = 4;
  logic clk = 0;
  always #1 clk = ~clk;
  logic              we    [2];
  logic [PIDX_W-1:0] wpage [2];
  lofs_t             wline [2];
  line_t             wdata [2];
  logic [PIDX_W-1:0] rpage [3];
  lofs_t             rline [3];
  line_t             rdata [3];
  line_t ref_mem [P*64];
  line_t exp_r [3];
  int checks = 0, failures = 0;
  config_memory #(.PAGES(P)) dut (.clk, .we_i(we), .wpage_i(wpage), .wline_i(wline), .wdata_i(wdata),
                                  .rpage_i(rpage), .rline_i(rline), .rdata_o(rdata));
  function automatic line_t rnd_line();
    line_t l;
    for (int w = 0; w < 16; w++) l[32*w +: 32] = $urandom;
    return l;
  endfunction
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    // fill every line once through alternating ports
    for (int a = 0; a < P*64; a++) begin
      @(negedge clk);
      we[a%2] = 1; we[1-a%2] = 0;
      wpage[a%2] = PIDX_W'(a/64); wline[a%2] = lofs_t'(a%64);
      wdata[a%2] = rnd_line(); ref_mem[a] = wdata[a%2];
      wpage[1-a%2] = '0; wline[1-a%2] = '0; wdata[1-a%2] = '0;
      for (int r = 0; r < 3; r++) begin rpage[r] = '0; rline[r] = '0; end
    end
    for (int it = 0; it < 3000; it++) begin
      @(negedge clk);
      // check reads issued last cycle
      if (it > 0) for (int r = 0; r < 3; r++) begin
        checks++;
        if (rdata[r] !== exp_r[r]) begin failures++; $display("FAIL read port %0d", r); end
      end
      for (int r = 0; r < 3; r++) begin
        int a;
        a = $urandom_range(0, P*64-1);
        rpage[r] = PIDX_W'(a/64); rline[r] = lofs_t'(a%64);
        exp_r[r] = ref_mem[a];              // read-first: old contents
      end
      for (int w = 0; w < 2; w++) begin
        int a;
        a = $urandom_range(0, P*64-1);
        if (w == 1 && $urandom_range(0, 3) == 0) a = int'({wpage[0][1:0], wline[0]});
        we[w] = ($urandom_range(0, 1) == 1);
        wpage[w] = PIDX_W'(a/64); wline[w] = lofs_t'(a%64); wdata[w] = rnd_line();
      end
      @(posedge clk);
      for (int w = 0; w < 2; w++) if (we[w]) ref_mem[{wpage[w][1:0], wline[w]}] = wdata[w];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
