// tb_y86_mem: self-checking test of the byte memory.
//
// A reference byte array mirrors loader and data writes.  Checks the
// 10-byte little-endian instruction window, the 8-byte data read, the
// data write on the clock edge, reads past the end (zero), and the
// imem_error / dmem_error flags at and beyond the top of memory.
module tb_y86_mem;
  import y86_pkg::*;

  localparam int unsigned N = 256;
  logic        clk = 0;
  word_t       ipc = 0, daddr = 0, wdata = 0, rdata, ld_addr = 0, dbg_addr = 0, dbg_data;
  logic [79:0] ibytes;
  logic        imem_error, dmem_error, dread = 0, dwrite = 0, ld_we = 0;
  logic [7:0]  ld_data = 0;
  logic [7:0]  ref_m [N];
  int checks = 0, failures = 0;

  y86_mem #(.MEM_BYTES(N)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string w, logic [79:0] g, logic [79:0] e);
    checks++;
    if (g !== e) begin failures++; $display("FAIL %s got %h exp %h", w, g, e); end
  endtask

  function automatic logic [7:0] rb(word_t a);
    return (a < N) ? ref_m[a] : 8'h00;
  endfunction

  initial begin
    logic [79:0] ei;
    word_t ed;
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      ld_we = 1; ld_addr = word_t'(i); ld_data = 8'($urandom); ref_m[i] = ld_data;
    end
    @(negedge clk); ld_we = 0;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      ipc   = word_t'($urandom_range(0, N + 4));
      daddr = word_t'($urandom_range(0, N + 2));
      dread = $urandom_range(0, 1); dwrite = ($urandom_range(0, 2) == 0);
      wdata = {$urandom, $urandom};
      dbg_addr = word_t'($urandom_range(0, N - 8));
      #1;
      for (int i = 0; i < 10; i++) ei[8*i +: 8] = rb(ipc + word_t'(i));
      chk("ibytes", ibytes, ei);
      chk("imem_error", 80'(imem_error), 80'(ipc >= N));
      chk("dmem_error", 80'(dmem_error), 80'((dread | dwrite) && daddr + 8 > N));
      for (int i = 0; i < 8; i++) ed[8*i +: 8] = dread ? rb(daddr + word_t'(i)) : 8'h00;
      chk("rdata", 80'(rdata), 80'(ed));
      for (int i = 0; i < 8; i++) ed[8*i +: 8] = rb(dbg_addr + word_t'(i));
      chk("dbg", 80'(dbg_data), 80'(ed));
      @(posedge clk);
      if (dwrite && daddr + 8 <= N)
        for (int i = 0; i < 8; i++) ref_m[daddr + word_t'(i)] = wdata[8*i +: 8];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
