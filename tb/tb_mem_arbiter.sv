// tb_mem_arbiter: the arbiter in front of a behavioural memory. Checks core
// reads/writes with the one-cycle ready, that the core is held off while
// the coprocessor owns the bus and then served, coprocessor accesses on
// both ports, and host loads taking port B.
// Sharing one memory between core and coprocessor is the document's; the
// priority rules checked here are this design's.
module tb_mem_arbiter;
  localparam int AW = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic        cv = 0, crdy;
  logic [31:0] ca = 0, cwd = 0, crd;
  logic [3:0]  cws = 0;
  logic        act = 0, pae = 0, pawe = 0, pbe = 0, hwe = 0;
  logic [AW-1:0] paa = 0, pba = 0, ha = 0;
  logic [31:0] pawd = 0, pard, pbrd, hd = 0;
  logic        ae, be;
  logic [3:0]  aw, bw;
  logic [AW-1:0] aa, ba;
  logic [31:0] awd, ard, bwd, brd;
  mem_arbiter #(.AW(AW)) dut (.clk_i(clk), .rst_ni(rst_n),
    .core_valid_i(cv), .core_addr_i(ca), .core_wdata_i(cwd), .core_wstrb_i(cws),
    .core_ready_o(crdy), .core_rdata_o(crd),
    .cp_active_i(act), .cp_a_en_i(pae), .cp_a_we_i(pawe), .cp_a_addr_i(paa),
    .cp_a_wdata_i(pawd), .cp_a_rdata_o(pard), .cp_b_en_i(pbe), .cp_b_addr_i(pba),
    .cp_b_rdata_o(pbrd), .host_we_i(hwe), .host_addr_i(ha), .host_wdata_i(hd),
    .a_en_o(ae), .a_we_o(aw), .a_addr_o(aa), .a_wdata_o(awd), .a_rdata_i(ard),
    .b_en_o(be), .b_we_o(bw), .b_addr_o(ba), .b_wdata_o(bwd), .b_rdata_i(brd));
  dp_ram #(.DEPTH(2**AW)) mem (.clk_i(clk), .a_en_i(ae), .a_we_i(aw), .a_addr_i(aa),
    .a_wdata_i(awd), .a_rdata_o(ard), .b_en_i(be), .b_we_i(bw), .b_addr_i(ba),
    .b_wdata_i(bwd), .b_rdata_o(brd));
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic core(input logic [31:0] a, input logic [31:0] d, input logic [3:0] s,
                      output logic [31:0] r, output int wait_cycles);
    @(negedge clk); cv = 1; ca = a; cwd = d; cws = s;
    wait_cycles = 0;
    @(posedge clk); #1;
    while (!crdy) begin wait_cycles++; @(posedge clk); #1; end
    r = crd;
    @(negedge clk); cv = 0; cws = 0;
  endtask
  initial begin
    logic [31:0] r; int w;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // host loads on port B
    for (int i = 0; i < 16; i++) begin
      @(negedge clk); hwe = 1; ha = AW'(i); hd = 32'h1000 + i;
    end
    @(negedge clk); hwe = 0;
    for (int i = 0; i < 16; i++) begin
      core(4 * i, 0, 0, r, w);
      check(r == 32'h1000 + i, "core reads host-loaded word");
      check(w == 0, "core served after one cycle");
    end
    core(4 * 3, 32'hAB00_0000, 4'b1000, r, w);
    core(4 * 3, 0, 0, r, w);
    check(r == 32'hAB00_1003, "core byte write");
    // coprocessor owns the bus: core held off
    @(negedge clk); act = 1;
    fork
      core(4 * 5, 0, 0, r, w);
      begin
        for (int i = 0; i < 6; i++) begin
          @(negedge clk); pae = 1; pawe = 1; paa = AW'(32 + i); pawd = 32'h5000 + i;
          pbe = 1; pba = AW'(i);
          @(posedge clk); #1;
          if (i > 0) check(pbrd == ((i == 3) ? 32'hAB00_1003 : 32'h1000 + i), $sformatf("coprocessor port B read %0d: %h", i, pbrd));
        end
        @(negedge clk); pae = 0; pawe = 0; pbe = 0;
        @(negedge clk); pae = 1; paa = AW'(33);
        @(negedge clk); pae = 0;
        check(pard == 32'h5001, "coprocessor port A read back");
        act = 0;
      end
    join
    check(w >= 8, "core waited while coprocessor active");
    check(r == 32'h1005, "core served after coprocessor released the bus");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
