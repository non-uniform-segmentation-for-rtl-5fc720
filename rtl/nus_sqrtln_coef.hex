89e98558ff5c
adc947bc3e7c
ada9208e65dc
ad88f87c7bbc
ad68cf777d3c
ad48a5bcb23c
a9287e297a1c
a908527376fc
a8e8263912bc
a4cff6f5211b
a4af9a67b45b
a08f40891ffb
9c6ee4a777fb
9c4e805ccb1b
982e1e900f9b
940db9a3343b
93ed514f005b
8fcce529f29b
8bac74d7401b
878bffced1bb
c38b856f2f5b
bf6b09eb19db
bb4a8754ae3b
b729fc69fe3b
af0971b11b9b
a6e8daf4503b
9ec832c8c79b
8eaf17ae5b3a
bead9a473d5a
aa8c1b92e71a
b68b6b32325a
aa8c8ff862ba
928f2d6d7fba
b6a9ec6ad9db
96adcb96561b
b6c99aad031c
96cd92adf6dc
b6e986a1859d
96ed84a818bd
b70981a7c79e
9b0d013595be
b7298069e87f
9b2d004d637f
b749801a7980
9b4d001358c0
b76980069e61
9b6d0004d641
b7898001a7a2
9b8d000135a2
b7a9800069e3
9bad00004d63
b7c980001a84
9bcd00001364
b7e9800006a5
9bed000004e5
b809000001c6
9c0c80000146
b02a00000067
c44f00000047
