// tb_shuffle_network: random source signals and random routings; every store
// port must carry the signals of the source it selects and every source must
// see the read data of the store it selects.
module tb_shuffle_network;
  localparam int NSRC = 8, NDST = 4, AW = 18, DW = 16;

  int checks = 0, failures = 0;
  logic          src_en [NSRC], src_we [NSRC];
  logic [AW-1:0] src_addr [NSRC];
  logic [DW-1:0] src_wdata [NSRC], src_rdata [NSRC];
  logic [1:0]    src_sel [NSRC];
  logic [2:0]    st_sel [NDST];
  logic          st_en [NDST], st_we [NDST];
  logic [AW-1:0] st_addr [NDST];
  logic [DW-1:0] st_wdata [NDST], st_rdata [NDST];

  shuffle_network #(.NSRC(NSRC), .NDST(NDST), .ADDR_W(AW), .DATA_W(DW)) dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      for (int i = 0; i < NSRC; i++) begin
        src_en[i] = 1'($urandom); src_we[i] = 1'($urandom);
        src_addr[i] = AW'($urandom); src_wdata[i] = DW'($urandom);
        src_sel[i] = 2'($urandom);
      end
      for (int s = 0; s < NDST; s++) begin
        st_sel[s] = 3'($urandom);
        st_rdata[s] = DW'($urandom);
      end
      #1;
      for (int s = 0; s < NDST; s++) begin
        automatic int k = int'(st_sel[s]);
        checks++;
        if (st_en[s] !== src_en[k] || st_we[s] !== src_we[k] ||
            st_addr[s] !== src_addr[k] || st_wdata[s] !== src_wdata[k]) begin
          failures++; $display("store %0d not routed from source %0d", s, k);
        end
      end
      for (int i = 0; i < NSRC; i++) begin
        checks++;
        if (src_rdata[i] !== st_rdata[src_sel[i]]) begin
          failures++; $display("source %0d read data wrong", i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
