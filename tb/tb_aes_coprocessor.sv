// tb_aes_coprocessor: drives the co-processor through its bus port as
// software would: stores blocks and the 0xDEADBEEF terminator in the input
// buffer, writes the control register, polls bit 2 and reads the output
// buffer. Checks the FIPS-197 C.1 vector in both directions (with the
// little-endian byte order of the buffers), a multi-block round trip, the
// stage sequence 0..9 seen on the control register, the cycles per block, and
// termination at the end of the buffer when no terminator is present.
// Reference values come from FIPS-197 C.1 and a software AES model; the
// buffer protocol follows the report, byte order and stop rules follow the
// block's own choices.
module tb_aes_coprocessor;
  localparam int WORDS = 17, AW = 5;   // four blocks and one terminator word
  logic clk = 0, rst = 1;
  logic sel_in = 0, sel_out = 0, sel_ctrl = 0, we = 0;
  logic [3:0] be = 4'hf;
  logic [AW-1:0] addr = 0;
  logic [31:0] wdata = 0, rdata;
  logic [7:0] ctrl;
  int checks = 0, failures = 0;
  int stage_seen [16];
  aes_coprocessor #(.WORDS(WORDS)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) stage_seen[ctrl[7:4]]++;
  initial begin
    repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  function automatic logic [31:0] bswap(input logic [31:0] w);
    return {w[7:0], w[15:8], w[23:16], w[31:24]};
  endfunction
  task automatic wr(input int buf_sel, input int a, input logic [31:0] d);
    @(negedge clk); sel_in = (buf_sel == 0); sel_ctrl = (buf_sel == 2); sel_out = 0;
    we = 1; addr = AW'(a); wdata = d;
    @(negedge clk); we = 0; sel_in = 0; sel_ctrl = 0;
  endtask
  task automatic rd(input int buf_sel, input int a, output logic [31:0] d);
    @(negedge clk); sel_out = (buf_sel == 1); sel_in = (buf_sel == 0); sel_ctrl = (buf_sel == 2);
    we = 0; addr = AW'(a);
    @(negedge clk); d = rdata; sel_out = 0; sel_in = 0; sel_ctrl = 0;
  endtask
  task automatic chk(input logic [31:0] got, input logic [31:0] exp, input string w);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s %08h exp %08h", w, got, exp); end
  endtask
  task automatic put_block(input int blk, input logic [127:0] b);
    for (int i = 0; i < 4; i++) wr(0, 4*blk + i, bswap(b[127-32*i -: 32]));
  endtask
  task automatic get_block(input int blk, output logic [127:0] b);
    logic [31:0] d;
    for (int i = 0; i < 4; i++) begin rd(1, 4*blk + i, d); b[127-32*i -: 32] = bswap(d); end
  endtask
  task automatic run(input logic [1:0] mode, input int nblk);
    logic [31:0] c;
    int cyc;
    wr(2, 0, {30'h0, mode});
    cyc = 0;
    do begin rd(2, 0, c); cyc += 2; end while (!c[2]);
    chk({28'h0, c[3:0]}, 32'h4, "ctrl when done");
    checks++;
    if (cyc > 40 * nblk + 12) begin failures++; $display("FAIL %0d cycles for %0d blocks", cyc, nblk); end
    $display("run of %0d blocks: %0d cycles", nblk, cyc);
  endtask
  initial begin
    logic [127:0] b, p [3];
    logic [31:0] c;
    repeat (2) @(posedge clk); rst <= 0;
    rd(2, 0, c); chk(c, 32'hA0, "idle ctrl");
    // single block, encrypt then decrypt
    put_block(0, 128'h00112233445566778899aabbccddeeff); wr(0, 4, 32'hDEADBEEF);
    run(2'b01, 1);
    get_block(0, b); chk(b[127:96], 32'h69c4e0d8, "C.1 ct w0"); chk(b[31:0], 32'h70b4c55a, "C.1 ct w3");
    put_block(0, 128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    run(2'b10, 1);
    get_block(0, b); chk(b[127:96], 32'h00112233, "C.1 pt w0"); chk(b[31:0], 32'hccddeeff, "C.1 pt w3");
    for (int s = 0; s < 10; s++) begin
      checks++;
      if (stage_seen[s] == 0) begin failures++; $display("FAIL stage %0d never seen", s); end
    end
    // three blocks, round trip
    for (int k = 0; k < 3; k++) begin p[k] = {$urandom, $urandom, $urandom, $urandom}; put_block(k, p[k]); end
    wr(0, 12, 32'hDEADBEEF);
    run(2'b01, 3);
    for (int k = 0; k < 3; k++) begin get_block(k, b); put_block(k, b); end
    run(2'b10, 3);
    for (int k = 0; k < 3; k++) begin
      get_block(k, b); chk(b[127:96], p[k][127:96], "rt w0"); chk(b[31:0], p[k][31:0], "rt w3");
    end
    // no terminator: stops at the end of the buffer after four blocks
    wr(0, 12, 32'h12345678);
    run(2'b01, 4);
    wr(2, 0, 0);
    rd(2, 0, c); chk(c, 32'hA0, "cleared ctrl");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
