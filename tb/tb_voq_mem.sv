// tb_voq_mem: random writes and reads on the two ports, including both in one
// clock, compared with a shadow array.  Reads of never-written addresses are
// not checked.
module tb_voq_mem;
  localparam int unsigned AW = 6, DW = 40;

  logic clk = 1'b0;
  logic we = 1'b0, re = 1'b0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [DW-1:0] wdata = '0, rdata;
  logic [DW-1:0] shadow [2**AW];
  bit written [2**AW];
  int checks = 0, failures = 0;

  voq_mem #(.ADDR_W(AW), .DATA_W(DW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [DW-1:0] expect_q;
    bit            pend;
    pend = 0;
    expect_q = '0;
    for (int a = 0; a < 2**AW; a++) written[a] = 0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      if (pend) begin
        checks++;
        if (rdata !== expect_q) begin
          failures++;
          if (failures < 10) $display("FAIL read got %h exp %h", rdata, expect_q);
        end
      end
      we    = ($urandom_range(0, 1) == 1);
      re    = ($urandom_range(0, 1) == 1);
      waddr = AW'($urandom);
      raddr = AW'($urandom);
      wdata = {$urandom, $urandom};
      if (re && we && raddr == waddr) raddr = raddr + 1'b1;
      pend = re && written[raddr];
      expect_q = shadow[raddr];
      if (we) begin
        shadow[waddr]  = wdata;
        written[waddr] = 1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
