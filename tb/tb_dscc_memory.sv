// tb_dscc_memory: checks the codeword memory (W = 73, DEPTH = 64): random
// writes, registered reads one cycle later, bit-flip injection into stored
// words, and write priority over an injection to the same word. A shadow array
// in the testbench holds the expected contents.
module tb_dscc_memory;
  localparam int W = 73, DEPTH = 64, AW = 6;

  int checks = 0, failures = 0;

  logic clk = 0, we = 0, re = 0, inj_en = 0;
  logic [AW-1:0] waddr = '0, raddr = '0, inj_addr = '0;
  logic [W-1:0]  wdata = '0, rdata, inj_mask = '0;
  logic [W-1:0]  shadow [DEPTH];

  dscc_memory #(.W(W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [W-1:0] rnd();
    logic [W-1:0] v;
    for (int i = 0; i < W; i++) v[i] = 1'($urandom);
    return v;
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] expect_rd;
    logic         check_rd;
    // fill
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; waddr = AW'(a); wdata = rnd(); shadow[a] = wdata;
    end
    @(negedge clk);
    we = 0;
    check_rd = 0;
    expect_rd = '0;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      if (check_rd) begin
        checks++;
        if (rdata !== expect_rd) begin
          failures++;
          $display("FAIL t=%0d rdata=%h exp=%h", t, rdata, expect_rd);
        end
      end
      we = 1'($urandom); waddr = AW'($urandom); wdata = rnd();
      inj_en = ($urandom_range(0, 3) == 0); inj_mask = rnd();
      inj_addr = (t % 50 == 0) ? waddr : AW'($urandom);
      re = 1'($urandom); raddr = AW'($urandom);
      // read sees the contents before this edge's updates
      check_rd = re;
      expect_rd = shadow[raddr];
      if (inj_en && !(we && waddr == inj_addr)) shadow[inj_addr] = shadow[inj_addr] ^ inj_mask;
      if (we) shadow[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
