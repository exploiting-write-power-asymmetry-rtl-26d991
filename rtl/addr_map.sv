// addr_map: translates a line address into the rank, bank, row and column of
// the PCM array. The fields are cut out of the address in the order given by
// the mapping scheme, most significant first (the channel field is empty since
// one channel is modelled):
//   SCHEME 1  rank:row:col:bank
//   SCHEME 2  row:col:bank:rank   (the main configuration)
//   SCHEME 3  row:col:rank:bank
//   SCHEME 4  row:rank:bank:col
// The four orders and the default are the document's; the field widths follow
// from the memory geometry in wpas_pkg. Purely combinational.
module addr_map
  import wpas_pkg::*;
#(
  parameter int unsigned SCHEME = 2
) (
  input  laddr_t addr,
  output maddr_t ma
);

  always_comb begin
    ma = '0;
    unique case (SCHEME)
      1: {ma.rank, ma.row, ma.col, ma.bank} = addr;
      3: {ma.row, ma.col, ma.rank, ma.bank} = addr;
      4: {ma.row, ma.rank, ma.bank, ma.col} = addr;
      default: {ma.row, ma.col, ma.bank, ma.rank} = addr;
    endcase
  end

endmodule
