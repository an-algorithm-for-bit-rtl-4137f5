// The 37 rows of the adder's truth table: a_i, b_i, c_i, sp_{i-1} and the
// expected c_{i+1}, sp_i, s_{i-1}, as digit values -1, 0, +1. The rows are the
// input combinations that canonic operands can produce; all others never
// occur. Shared by the testbenches of spt_fc, spt_fsp and spt_fs.
localparam int TABLE1_ROWS = 37;
localparam int TABLE1 [TABLE1_ROWS][7] = '{
  '{ 0,  0,  0,  0,  0,  0,  0},
  '{ 0,  0,  1,  0,  0,  1,  0},
  '{ 0,  1,  0,  0,  0,  1,  0},
  '{ 1,  0,  0,  0,  0,  1,  0},
  '{ 0,  0, -1,  0,  0, -1,  0},
  '{ 0, -1,  0,  0,  0, -1,  0},
  '{-1,  0,  0,  0,  0, -1,  0},
  '{ 0,  1,  1,  0,  1,  0,  0},
  '{ 1,  0,  1,  0,  1,  0,  0},
  '{ 1,  1,  0,  0,  1,  0,  0},
  '{ 0, -1, -1,  0, -1,  0,  0},
  '{-1,  0, -1,  0, -1,  0,  0},
  '{-1, -1,  0,  0, -1,  0,  0},
  '{-1,  1,  0,  0,  0,  0,  0},
  '{ 1, -1,  0,  0,  0,  0,  0},
  '{ 0, -1,  1,  0,  0,  0,  0},
  '{-1,  0,  1,  0,  0,  0,  0},
  '{ 0,  1, -1,  0,  0,  0,  0},
  '{ 1,  0, -1,  0,  0,  0,  0},
  '{ 0,  0,  0,  1,  0,  0,  1},
  '{ 0,  1,  0,  1,  1,  0, -1},
  '{ 1,  0,  0,  1,  1,  0, -1},
  '{ 0, -1,  0,  1,  0,  0, -1},
  '{-1,  0,  0,  1,  0,  0, -1},
  '{ 1,  1,  0,  1,  1,  0,  1},
  '{-1, -1,  0,  1, -1,  0,  1},
  '{-1,  1,  0,  1,  0,  0,  1},
  '{ 1, -1,  0,  1,  0,  0,  1},
  '{ 0,  0,  0, -1,  0,  0, -1},
  '{ 0,  1,  0, -1,  0,  0,  1},
  '{ 1,  0,  0, -1,  0,  0,  1},
  '{ 0, -1,  0, -1, -1,  0,  1},
  '{-1,  0,  0, -1, -1,  0,  1},
  '{ 1,  1,  0, -1,  1,  0, -1},
  '{-1, -1,  0, -1, -1,  0, -1},
  '{-1,  1,  0, -1,  0,  0, -1},
  '{ 1, -1,  0, -1,  0,  0, -1}
};
