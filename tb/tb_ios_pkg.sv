// tb_ios_pkg: helpers shared by the IOS testbenches. line_pattern() gives the
// contents of every memory line as a function of its line address, so any
// response can be checked without a copy of memory.
package tb_ios_pkg;
  import ios_pkg::*;

  function automatic line_data_t line_pattern(line_addr_t a);
    line_data_t d;
    for (int i = 0; i < LINE_W / 32; i++) begin
      d[i*32 +: 32] = {a[15:0], 16'(i)} ^ {6'(i), a} ^ 32'h5A5A_0000;
    end
    return d;
  endfunction
endpackage
