// tb_dual_port_bram: random reads and writes on both ports against a
// reference array: one-cycle read latency, read-first on a same-cycle
// write, data written by one port visible on the other, and port B winning
// a same-address write collision. A small address width keeps collisions
// frequent.
module tb_dual_port_bram;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned AW = 4, DW = 32;

  logic clk = 0;
  logic a_en = 0, a_we = 0, b_en = 0, b_we = 0;
  logic [AW-1:0] a_addr = '0, b_addr = '0;
  logic [DW-1:0] a_wdata = '0, b_wdata = '0, a_rdata, b_rdata;
  logic [DW-1:0] ref_mem [2**AW];
  int checks = 0, failures = 0, collisions = 0;

  dual_port_bram #(.AW(AW), .DW(DW)) dut (
    .clk_i(clk),
    .a_en_i(a_en), .a_we_i(a_we), .a_addr_i(a_addr), .a_wdata_i(a_wdata), .a_rdata_o(a_rdata),
    .b_en_i(b_en), .b_we_i(b_we), .b_addr_i(b_addr), .b_wdata_i(b_wdata), .b_rdata_o(b_rdata));

  always #4000 clk = ~clk;

  initial begin
    logic [DW-1:0] exp_a, exp_b;
    logic chk_a, chk_b;
    // Fill the memory through port A so that all reads are defined.
    for (int i = 0; i < 2**AW; i++) begin
      @(negedge clk);
      a_en = 1; a_we = 1; a_addr = AW'(i); a_wdata = $urandom();
      ref_mem[i] = a_wdata;
    end
    @(negedge clk);
    a_en = 0; a_we = 0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      a_en = ($urandom_range(0, 3) != 0); a_we = $urandom_range(0, 1);
      b_en = ($urandom_range(0, 3) != 0); b_we = $urandom_range(0, 1);
      a_addr = AW'($urandom()); b_addr = AW'($urandom());
      a_wdata = $urandom(); b_wdata = $urandom();
      chk_a = a_en; chk_b = b_en;
      exp_a = ref_mem[a_addr]; exp_b = ref_mem[b_addr];
      if (a_en && a_we && b_en && b_we && a_addr == b_addr) collisions++;
      if (a_en && a_we) ref_mem[a_addr] = a_wdata;
      if (b_en && b_we) ref_mem[b_addr] = b_wdata;
      @(posedge clk);
      #1;
      if (chk_a) begin
        checks++;
        if (a_rdata !== exp_a) begin failures++; $display("FAIL port A read %h expected %h", a_rdata, exp_a); end
      end
      if (chk_b) begin
        checks++;
        if (b_rdata !== exp_b) begin failures++; $display("FAIL port B read %h expected %h", b_rdata, exp_b); end
      end
    end
    @(negedge clk);
    a_we = 0; b_we = 0;
    // Read everything back through both ports.
    for (int i = 0; i < 2**AW; i++) begin
      @(negedge clk);
      a_en = 1; b_en = 1; a_addr = AW'(i); b_addr = AW'(i);
      @(posedge clk);
      #1;
      checks += 2;
      if (a_rdata !== ref_mem[i] || b_rdata !== ref_mem[i]) begin
        failures++;
        $display("FAIL final word %0d: A %h B %h expected %h", i, a_rdata, b_rdata, ref_mem[i]);
      end
    end
    checks++;
    if (collisions == 0) begin failures++; $display("FAIL no write collision happened"); end
    $display("collisions=%0d", collisions);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
