// tb_util_pkg: helpers shared by the testbenches.
// init_word gives the initial content of every word of the lower-level memory
// model as a fixed function of its byte address, so checkers can predict load
// data without reading the model.
package tb_util_pkg;
  function automatic logic [31:0] init_word(input logic [31:0] a);
    return (a * 32'h9E37_79B9) ^ 32'hA5A5_5A5A;
  endfunction
endpackage
