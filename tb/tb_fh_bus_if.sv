// tb_fh_bus_if: writes and reads every register of the bus interface with
// both directions of R/W-N, checks the parameter buffer order and its reset
// by a zero CALL_SVC write.
`timescale 1ns/1ps
module tb_fh_bus_if;
  logic clk = 0, rst_n = 0;
  logic cs, rw_n;
  logic [2:0] adr;
  logic [15:0] wdata, rdata, call_svc, return_data;
  logic [15:0] params [4];
  logic hs_tsw, block_tsw, hs_svc;
  logic [7:0] next_task_id;
  int checks = 0, failures = 0;

  fh_bus_if #(.NTASKS(256), .DW(16), .NPARAM(4)) dut (.clk, .rst_n, .cs, .rw_n, .adr,
    .wdata, .rdata, .hs_tsw, .block_tsw, .call_svc, .params, .next_task_id, .hs_svc,
    .return_data);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input logic [2:0] a, input logic [15:0] d);
    @(negedge clk); cs = 1; rw_n = 0; adr = a; wdata = d;
    @(negedge clk); cs = 0; rw_n = 1;
  endtask

  task automatic rd(input logic [2:0] a, output logic [15:0] d);
    @(negedge clk); cs = 1; rw_n = 1; adr = a; #1 d = rdata;
    @(negedge clk); cs = 0;
  endtask

  task automatic chk(string what, logic [15:0] got, logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %h expected %h", what, got, exp);
    end
  endtask

  logic [15:0] d;

  initial begin
    cs = 0; rw_n = 1; adr = 0; wdata = 0;
    hs_svc = 0; return_data = 16'hbeef; next_task_id = 8'd42;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // reads
    rd(3'b001, d); chk("NEXT_TASK_ID", d, 16'd42);
    rd(3'b101, d); chk("RETURN_DATA", d, 16'hbeef);
    rd(3'b100, d); chk("HS_SVC 0", d, 16'd0);
    hs_svc = 1;
    rd(3'b100, d); chk("HS_SVC 1", d, 16'd1);
    // write-only registers read as zero
    rd(3'b000, d); chk("HS_TSW read", d, 16'd0);
    rd(3'b011, d); chk("CALL_SVC read", d, 16'd0);
    rd(3'b110, d); chk("PARAMETER_DATA read", d, 16'd0);
    // HS_TSW
    wr(3'b000, 16'hfffe); chk("hs_tsw 0", 16'(hs_tsw), 0);
    wr(3'b000, 16'h0001); chk("hs_tsw 1", 16'(hs_tsw), 1);
    wr(3'b000, 16'h0000); chk("hs_tsw cleared", 16'(hs_tsw), 0);
    // BLOCK_TSW read and write
    wr(3'b010, 16'h0001); chk("block_tsw", 16'(block_tsw), 1);
    rd(3'b010, d); chk("BLOCK_TSW read", d, 16'd1);
    wr(3'b010, 16'h0000); chk("block_tsw off", 16'(block_tsw), 0);
    // writes to read-only registers do nothing
    wr(3'b001, 16'h0001); wr(3'b100, 16'h0001); wr(3'b101, 16'h0001);
    chk("no side effect", {hs_tsw, block_tsw, call_svc[0]}, 0);
    // parameters in order
    wr(3'b110, 16'h1111); wr(3'b110, 16'h2222); wr(3'b110, 16'h3333); wr(3'b110, 16'h4444);
    wr(3'b110, 16'h5555);   // fifth word ignored
    chk("p0", params[0], 16'h1111); chk("p1", params[1], 16'h2222);
    chk("p2", params[2], 16'h3333); chk("p3", params[3], 16'h4444);
    wr(3'b011, 16'h0200); chk("call_svc", call_svc, 16'h0200);
    wr(3'b110, 16'h6666); chk("p0 kept", params[0], 16'h1111);
    wr(3'b011, 16'h0000); chk("call_svc cleared", call_svc, 0);
    wr(3'b110, 16'h7777); chk("p0 after reset of index", params[0], 16'h7777);
    wr(3'b110, 16'h8888); chk("p1 after reset of index", params[1], 16'h8888);
    // cs low writes nothing
    @(negedge clk); cs = 0; rw_n = 0; adr = 3'b010; wdata = 16'h1;
    @(negedge clk); rw_n = 1;
    chk("cs low", 16'(block_tsw), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
