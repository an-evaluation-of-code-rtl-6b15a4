// tb_model_pkg: reference model of the five-process SDL example, written
// independently of the RTL. Task bodies: c11 = +0x11, c12/c22 = + PrC's
// transition count, c13 = +0x13, c21 = +0x21, c23 = +0x23 in state EX and
// XOR 0x23 in state EY (PrE toggles EX/EY on every m23).
package tb_model_pkg;
  function automatic logic [7:0] thread1(logic [7:0] x, logic [7:0] cnt);
    return 8'(x + 8'h11 + cnt + 8'h13);
  endfunction
  function automatic logic [7:0] thread2(logic [7:0] x, logic [7:0] cnt, bit st_ey);
    logic [7:0] y;
    y = 8'(x + 8'h21 + cnt);
    return st_ey ? (y ^ 8'h23) : 8'(y + 8'h23);
  endfunction
  // recover PrC's count from an input/output pair
  function automatic logic [7:0] cnt_of_m14(logic [7:0] x, logic [7:0] r);
    return 8'(r - x - 8'h24);
  endfunction
  function automatic logic [7:0] cnt_of_m24(logic [7:0] x, logic [7:0] r, bit st_ey);
    logic [7:0] y;
    y = st_ey ? (r ^ 8'h23) : 8'(r - 8'h23);
    return 8'(y - x - 8'h21);
  endfunction
endpackage
