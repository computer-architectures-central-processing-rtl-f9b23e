// insn_length_decoder - RISC-V instruction length from the first 16-bit
// parcel.
//
// RISC-V encodes the length of a variable-length instruction in the low
// bits of its first parcel (the parcel at the lowest address):
//   bits[1:0]  != 11                          -> 16 bits
//   bits[1:0]  == 11, bits[4:2] != 111        -> 32 bits
//   bits[5:0]  == 011111                      -> 48 bits
//   bits[6:0]  == 0111111                     -> 64 bits
//   bits[6:0]  == 1111111, nnn = bits[14:12]  -> 80 + 16*nnn bits (nnn != 111)
//   bits[6:0]  == 1111111, nnn == 111         -> reserved (192 bits or more)
// This is the length scheme of the RISC-V base ISA as presented in the
// lecture; the output coding (length in bits plus a reserved flag, length
// 0 when reserved) is this design's. Purely combinational.
// The single-cycle CPU of this project executes 32-bit instructions only;
// this block is a separate design and is not part of its fetch path.
module insn_length_decoder (
  input  logic [15:0] parcel,    // first (lowest-addressed) 16 bits
  output logic [7:0]  len_bits,  // 16, 32, 48, 64, 80 ... 176; 0 if reserved
  output logic        reserved   // 192-bit or longer encoding space
);

  always_comb begin
    reserved = 1'b0;
    if (parcel[1:0] != 2'b11)             len_bits = 8'd16;
    else if (parcel[4:2] != 3'b111)       len_bits = 8'd32;
    else if (parcel[5] == 1'b0)           len_bits = 8'd48;
    else if (parcel[6] == 1'b0)           len_bits = 8'd64;
    else if (parcel[14:12] != 3'b111)     len_bits = 8'd80 + {1'b0, parcel[14:12], 4'b0000};
    else begin
      len_bits = 8'd0;
      reserved = 1'b1;
    end
  end

endmodule
