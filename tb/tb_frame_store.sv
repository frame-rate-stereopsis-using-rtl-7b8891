// tb_frame_store: random reads and writes on both ports against an array
// model; checks the one-clock read latency and that port B returns the old
// word when port A writes the same address in the same clock.
module tb_frame_store;
  localparam int AW = 8, DW = 8;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic a_en, a_we, b_en;
  logic [AW-1:0] a_addr, b_addr;
  logic [DW-1:0] a_wdata, a_rdata, b_rdata;
  logic [DW-1:0] model [2**AW];

  frame_store #(.ADDR_W(AW), .DATA_W(DW)) dut (.*);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [DW-1:0] ea, eb;
    logic ra, rb;
    a_en = 0; a_we = 0; b_en = 0; a_addr = 0; b_addr = 0; a_wdata = 0;
    // fill
    for (int i = 0; i < 2**AW; i++) begin
      @(negedge clk);
      a_en = 1; a_we = 1; a_addr = AW'(i); a_wdata = DW'($urandom);
      model[i] = a_wdata;
    end
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      a_en = 1; a_we = ($urandom_range(0, 2) == 0);
      a_addr = AW'($urandom); a_wdata = DW'($urandom);
      b_en = $urandom_range(0, 1);
      b_addr = (t % 4 == 0) ? a_addr : AW'($urandom);
      ra = a_en && !a_we; rb = b_en;
      ea = model[a_addr]; eb = model[b_addr];
      if (a_we) model[a_addr] = a_wdata;
      @(posedge clk); #1;
      if (ra) begin
        checks++;
        if (a_rdata !== ea) begin failures++; $display("A @%0d got %h exp %h", a_addr, a_rdata, ea); end
      end
      if (rb) begin
        checks++;
        if (b_rdata !== eb) begin failures++; $display("B @%0d got %h exp %h", b_addr, b_rdata, eb); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
