b3b40026
88c402b6
8ad40a76
9ee41df6
82e43296
baf43eb6
b5f44816
b1f45016
a8f46376
99f48906
88f4bbf6
be04e5c6
bb04fc46
b9050c16
b8051426
b60524a6
b40535c6
ad057556
a605c0d6
a405d7e6
9e0621e6
