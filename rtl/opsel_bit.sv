// opsel_bit: protected opcode selection for one result bit.
//
// Four opcode error correctors (one per operation) each correct the coded
// opcode {e1,e2,h1c,h2c,h3c} independently. Behind each corrector one AND
// gate, with inverted inputs where the opcode has a 0, decodes its own
// operation: XOR = 11, AND = 10, ADD = 01, OR = 00 (first digit e1). Each
// decode output gates that operation's candidate bit, and an OR of the four
// products is the output bit. With a correct opcode exactly one decode is
// high. A single wrong opcode bit is removed by the correctors; a fault
// inside one corrector or gate can only change this one output bit, and
// every result bit has its own copy of this circuit. Combinational.
//
// Structure, opcode values and gate polarities follow the document's opcode
// selection figure. The opcode code uses three Hamming bits where the
// document counts two: two data bits with two check bits cannot correct a
// single error, three can.
module opsel_bit (
  input  logic [1:0] op_e,   // {e1, e2}
  input  logic [2:0] op_h,   // {h3c, h2c, h1c}
  input  logic       c_xor,  // candidate bit from the XOR unit
  input  logic       c_and,  // candidate bit from the AND unit
  input  logic       c_add,  // candidate bit from the adder
  input  logic       c_or,   // candidate bit from the OR unit
  output logic       out
);

  // Data bit d1 of the opcode code is e1, d2 is e2.
  logic [1:0] e_dat;
  assign e_dat = {op_e[0], op_e[1]};

  logic [1:0] ec_xor, ec_and, ec_add, ec_or;  // corrected {e2,e1}

  ham_corrector #(.K(2)) u_cor_xor (.c_d(e_dat), .c_h(op_h), .dc(ec_xor), .err());
  ham_corrector #(.K(2)) u_cor_and (.c_d(e_dat), .c_h(op_h), .dc(ec_and), .err());
  ham_corrector #(.K(2)) u_cor_add (.c_d(e_dat), .c_h(op_h), .dc(ec_add), .err());
  ham_corrector #(.K(2)) u_cor_or  (.c_d(e_dat), .c_h(op_h), .dc(ec_or),  .err());

  logic sel_xor, sel_and, sel_add, sel_or;

  assign sel_xor =  ec_xor[0] &  ec_xor[1];   // 11
  assign sel_and =  ec_and[0] & ~ec_and[1];   // 10
  assign sel_add = ~ec_add[0] &  ec_add[1];   // 01
  assign sel_or  = ~ec_or[0]  & ~ec_or[1];    // 00

  assign out = (sel_xor & c_xor) | (sel_and & c_and) | (sel_add & c_add) | (sel_or & c_or);

endmodule
