// riscv_lsu: load/store unit of the MEM stage. For a store it turns the
// address and size (funct3: byte, halfword, word) into the four byte-write
// enables of the memory and shifts the store data into the addressed lanes.
// For a load it selects the addressed byte or halfword of the 32-bit read
// word and sign- or zero-extends it (lb/lh/lw/lbu/lhu). Accesses must be
// naturally aligned: the low address bits that a wider access ignores are
// dropped, so a misaligned access reads or writes the aligned unit that
// contains it. Combinational.
// From the Orca report: aligned accesses only.
// Own choices: misalignment is not detected.
module riscv_lsu (
  input  logic [31:0] addr,
  input  logic [2:0]  funct3,
  input  logic [31:0] store_data,
  output logic [3:0]  be,
  output logic [31:0] wdata,
  input  logic [31:0] rdata,
  output logic [31:0] load_data
);
  logic [7:0]  byte_v;
  logic [15:0] half_v;

  always_comb begin
    unique case (funct3[1:0])
      2'd0: begin be = 4'b0001 << addr[1:0]; wdata = {4{store_data[7:0]}}; end
      2'd1: begin be = addr[1] ? 4'b1100 : 4'b0011; wdata = {2{store_data[15:0]}}; end
      default: begin be = 4'b1111; wdata = store_data; end
    endcase
  end

  always_comb begin
    byte_v = rdata[8*addr[1:0] +: 8];
    half_v = addr[1] ? rdata[31:16] : rdata[15:0];
    unique case (funct3)
      3'd0: load_data = {{24{byte_v[7]}}, byte_v};
      3'd1: load_data = {{16{half_v[15]}}, half_v};
      3'd4: load_data = {24'h0, byte_v};
      3'd5: load_data = {16'h0, half_v};
      default: load_data = rdata;
    endcase
  end
endmodule
