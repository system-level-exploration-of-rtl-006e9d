// Helpers shared by the cache-level testbenches, included inside a module
// that imports dl1_pkg: the reference memory image (the address-derived
// pattern the L2 model starts from) and address construction.
  function automatic word_t init_word(laddr_t la, int w);
    return word_t'(la) * 32'h9E37_79B9 + word_t'(w) * 32'h0101_0101 + 32'h1234_5677;
  endfunction

  // byte address of word `w` (0..31) of VWB block `b`
  function automatic addr_t blk_addr(int b, int w);
    return (addr_t'(b) << $clog2(VWB_LINE_BITS / 8)) | addr_t'(w * 4);
  endfunction

  function automatic word_t mem_init(addr_t a);
    return init_word(a[ADDR_BITS-1:OFF_BITS], int'(a[OFF_BITS-1:2]));
  endfunction
