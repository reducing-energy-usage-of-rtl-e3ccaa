// ncl_mult4x4 - 4-bit by 4-bit dual-rail NCL multiplier with one combinational stage.
//
// Structure: input register (8 bits, {x, y}) -> partial products -> three-level adder tree ->
// output register (8 bits, s). Both registers reset to NULL. Full-word completion: the input
// register's request is the completion of the output register's acknowledges, and the module's
// ko (to the sender) is the completion of the input register's acknowledges.
//
// Partial products pp[i][j] = y[i] & x[j] (weight i+j). The four diagonal ones (i == j) use the
// input-complete AND, the other twelve the cheaper input-incomplete AND; because every input bit
// reaches one diagonal AND, the product is still complete with respect to all inputs. The adder
// tree (column = weight):
//   level 1: col1 HA(pp01, pp10); col2 FA(pp02, pp11, pp20); col3 FA(pp03, pp12, pp21);
//            col4 FA(pp13, pp22, pp31); col5 HA(pp23, pp32)
//   level 2: col2 HA; col3 FA (with pp30); col4 HA; col5 HA; col6 HA (with pp33)
//   level 3: col3 HA; col4 FA; col5 FA; col6 FA (its carry unused); col7 from ncl_gens7.
// The stage structure, the complete/incomplete AND placement and the adder tree follow the
// design's multiplier; the cell insides are those of the helper modules.
// Interface: x, y (dual-rail operands), ki (request from the receiver, 1 = rfd), rst (active
// high), s (dual-rail product), ko (request to the sender). One DATA/NULL cycle per operation.
// Loops: besides the gates' own state holding (th_gate), the handshake closes a loop from the
// output register's acknowledges through completion back to the input register's request; the
// combinational loops tools report here are these intended asynchronous loops.
module ncl_mult4x4
  import ncl_pkg::*;
(
  input  dr_t [3:0] x,
  input  dr_t [3:0] y,
  input  logic      ki,
  input  logic      rst,
  output dr_t [7:0] s,
  output logic      ko
);

  dr_t  [7:0] in_q;
  logic [7:0] in_ko;
  logic       in_ki;
  dr_t  [7:0] prod;
  logic [7:0] out_ko;

  ncl_register #(.WIDTH(8)) u_in_reg (
    .d({x, y}), .ki({8{in_ki}}), .rst(rst), .q(in_q), .ko(in_ko)
  );
  ncl_completion #(.WIDTH(8)) u_in_comp (.a(in_ko), .z(ko));

  dr_t [3:0] xq, yq;
  assign xq = in_q[7:4];
  assign yq = in_q[3:0];

  // Partial products.
  dr_t pp [4][4];
  for (genvar i = 0; i < 4; i++) begin : g_row
    for (genvar j = 0; j < 4; j++) begin : g_col
      ncl_and2 #(.COMPLETE(i == j)) u_and (.a(yq[i]), .b(xq[j]), .z(pp[i][j]));
    end
  end

  // Level 1: sN_M / cN_M are the sum and carry of level N that sit in column M.
  dr_t s1_1, c1_2, s1_2, c1_3, s1_3, c1_4, s1_4, c1_5, s1_5, c1_6;
  ncl_half_adder u_l1c1 (.x(pp[0][1]), .y(pp[1][0]), .co(c1_2), .s(s1_1));
  ncl_full_adder u_l1c2 (.ci(pp[0][2]), .x(pp[1][1]), .y(pp[2][0]), .co(c1_3), .s(s1_2));
  ncl_full_adder u_l1c3 (.ci(pp[0][3]), .x(pp[1][2]), .y(pp[2][1]), .co(c1_4), .s(s1_3));
  ncl_full_adder u_l1c4 (.ci(pp[1][3]), .x(pp[2][2]), .y(pp[3][1]), .co(c1_5), .s(s1_4));
  ncl_half_adder u_l1c5 (.x(pp[2][3]), .y(pp[3][2]), .co(c1_6), .s(s1_5));

  // Level 2.
  dr_t s2_2, c2_3, s2_3, c2_4, s2_4, c2_5, s2_5, c2_6, s2_6, c2_7;
  ncl_half_adder u_l2c2 (.x(c1_2), .y(s1_2), .co(c2_3), .s(s2_2));
  ncl_full_adder u_l2c3 (.ci(pp[3][0]), .x(c1_3), .y(s1_3), .co(c2_4), .s(s2_3));
  ncl_half_adder u_l2c4 (.x(c1_4), .y(s1_4), .co(c2_5), .s(s2_4));
  ncl_half_adder u_l2c5 (.x(c1_5), .y(s1_5), .co(c2_6), .s(s2_5));
  ncl_half_adder u_l2c6 (.x(pp[3][3]), .y(c1_6), .co(c2_7), .s(s2_6));

  // Level 3 (carry-propagating row).
  dr_t s3_3, c3_4, s3_4, c3_5, s3_5, c3_6, s3_6, c3_7_unused;
  ncl_half_adder u_l3c3 (.x(c2_3), .y(s2_3), .co(c3_4), .s(s3_3));
  ncl_full_adder u_l3c4 (.ci(s2_4), .x(c2_4), .y(c3_4), .co(c3_5), .s(s3_4));
  ncl_full_adder u_l3c5 (.ci(c3_5), .x(c2_5), .y(s2_5), .co(c3_6), .s(s3_5));
  ncl_full_adder u_l3c6 (.ci(c3_6), .x(c2_6), .y(s2_6), .co(c3_7_unused), .s(s3_6));

  dr_t s3_7;
  ncl_gens7 u_l3c7 (.c(c2_7), .x(s2_6), .y(c2_6), .z(c3_6), .s(s3_7));

  assign prod = {s3_7, s3_6, s3_5, s3_4, s3_3, s2_2, s1_1, pp[0][0]};

  ncl_register #(.WIDTH(8)) u_out_reg (
    .d(prod), .ki({8{ki}}), .rst(rst), .q(s), .ko(out_ko)
  );
  ncl_completion #(.WIDTH(8)) u_out_comp (.a(out_ko), .z(in_ki));

endmodule
