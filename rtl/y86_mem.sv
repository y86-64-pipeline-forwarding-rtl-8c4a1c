// y86_mem: byte-addressed Y86-64 memory with an instruction port, a data
// port and a loader port.
//
// The instruction port returns the ten bytes starting at ipc (the longest
// Y86-64 instruction), packed little-endian: byte ipc is bits [7:0].
// Bytes past the end of the array read as zero; imem_error is raised when
// ipc itself lies outside the array.  The data port reads eight bytes
// little-endian combinationally at daddr and, when dwrite is set, writes
// wdata there on the rising clock edge; dmem_error is raised when any of
// the eight bytes lies outside the array, and an erroneous write is
// dropped.  The loader port (ld_we/ld_addr/ld_data) writes one byte per
// clock and is how a program is placed in memory; a data write in the same
// cycle to the same byte takes precedence.  A fourth port (dbg_addr) reads
// eight bytes for inspection.  The memory is not cleared by reset.
// Instruction and data share one array, as in Y86-64.  The size and all
// port shapes are choices of this design.
module y86_mem
  import y86_pkg::*;
#(
  parameter int unsigned MEM_BYTES = 4096
) (
  input  logic        clk,
  // instruction fetch
  input  word_t       ipc,
  output logic [79:0] ibytes,
  output logic        imem_error,
  // data
  input  word_t       daddr,
  input  logic        dread,
  input  logic        dwrite,
  input  word_t       wdata,
  output word_t       rdata,
  output logic        dmem_error,
  // loader
  input  logic        ld_we,
  input  word_t       ld_addr,
  input  logic [7:0]  ld_data,
  // debug read
  input  word_t       dbg_addr,
  output word_t       dbg_data
);

  logic [7:0] mem [MEM_BYTES];

  function automatic logic [7:0] rd_byte(word_t a);
    if (a < 64'(MEM_BYTES)) return mem[a[$clog2(MEM_BYTES)-1:0]];
    return 8'h00;
  endfunction

  always_comb begin
    for (int i = 0; i < 10; i++) ibytes[8*i +: 8] = rd_byte(ipc + 64'(i));
  end
  assign imem_error = (ipc >= 64'(MEM_BYTES));

  assign dmem_error = (dread | dwrite) &
                      ((daddr > 64'(MEM_BYTES - 8)) );
  always_comb begin
    for (int i = 0; i < 8; i++) begin
      rdata[8*i +: 8]    = dread ? rd_byte(daddr + 64'(i)) : 8'h00;
      dbg_data[8*i +: 8] = rd_byte(dbg_addr + 64'(i));
    end
  end

  always_ff @(posedge clk) begin
    if (ld_we && ld_addr < 64'(MEM_BYTES))
      mem[ld_addr[$clog2(MEM_BYTES)-1:0]] <= ld_data;
    if (dwrite && !dmem_error)
      for (int i = 0; i < 8; i++)
        mem[(daddr[$clog2(MEM_BYTES)-1:0] + $clog2(MEM_BYTES)'(i))] <= wdata[8*i +: 8];
  end

endmodule
